// config_ctrl: configuration controller of the RAM-integrator processor.
//
// Decodes 32-bit configuration frames ({opcode, 24-bit payload}, opcodes in
// aer_conv_pkg) into the kernel RAM and the three settings the document
// lists: kernel size, forgetting period and forgetting quantity. A kernel
// frame becomes a one-cycle write to the kernel RAM (`k_we`); that cycle
// the RAM is taken from the convolution engine. Frames with an unknown
// opcode, an out-of-range kernel index or an even or out-of-range kernel
// size are ignored and counted in `bad_frame` pulses. Reset values: kernel
// side KMAX, forgetting off (period 0, quantity 0). The frame format is this
// design's choice.
module config_ctrl
  import aer_conv_pkg::*;
#(
  parameter int unsigned PW = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_valid,
  input  logic [31:0]         frame,
  // kernel RAM write
  output logic                k_we,
  output logic [KADDR_W-1:0]  k_waddr,
  output logic signed [KW-1:0] k_wdata,
  // settings
  output logic [3:0]          ksize,
  output logic [PW-1:0]       fperiod,
  output logic [CELL_W-1:0]   fquant,
  output logic                bad_frame
);

  logic [7:0]  op;
  logic [23:0] pl;

  assign op = frame[31:24];
  assign pl = frame[23:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_we      <= 1'b0;
      k_waddr   <= '0;
      k_wdata   <= '0;
      ksize     <= 4'(KMAX);
      fperiod   <= '0;
      fquant    <= '0;
      bad_frame <= 1'b0;
    end else begin
      k_we      <= 1'b0;
      bad_frame <= 1'b0;
      if (frame_valid) begin
        unique case (op)
          OP_KERNEL:
            if (pl[14:8] < 7'(KENTRIES)) begin
              k_we    <= 1'b1;
              k_waddr <= KADDR_W'(pl[14:8]);
              k_wdata <= pl[7:0];
            end else bad_frame <= 1'b1;
          OP_KSIZE:
            if (pl[0] && pl[3:0] <= 4'(KMAX)) ksize <= pl[3:0];
            else bad_frame <= 1'b1;
          OP_FPERIOD: fperiod <= PW'(pl);
          OP_FQUANT:  fquant  <= pl[CELL_W-1:0];
          default:    bad_frame <= 1'b1;
        endcase
      end
    end
  end

endmodule
