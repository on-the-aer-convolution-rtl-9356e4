// forget_ctrl: forgetting controller of the RAM-integrator processor.
//
// A programmable counter counts clock cycles up to the forgetting period.
// Each time it expires the controller sweeps the whole integrator matrix,
// asking the cell updater to subtract the forgetting quantity from every
// cell (results stop at zero). This keeps cells from sitting at the top of
// their range under heavy traffic. The counter is held while a sweep runs,
// so sweeps start every `period` cycles plus the sweep time. Period 0 or
// quantity 0 turns forgetting off. That the period and quantity are
// programmable and that the counter decreases the cells by a constant is
// the document's; sweeping all cells per period is this design's reading.
//
// Right after reset the controller makes one sweep that subtracts the
// largest amount, which clears every cell to zero; `clearing` is high until
// it ends. A sweep issues one request per cell through a valid/ready port
// and takes at least 2*DEPTH cycles.
module forget_ctrl
  import aer_conv_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned PW    = 24,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [PW-1:0]             period,
  input  logic [CELL_W-1:0]         quant,
  // cell updater request port
  output logic                      f_valid,
  input  logic                      f_ready,
  output logic [AW-1:0]             f_addr,
  output logic signed [DELTA_W-1:0] f_delta,
  // status
  output logic                      clearing,
  output logic                      sweep_start
);

  typedef enum logic [1:0] {CLEAR, COUNT, SWEEP} fg_state_e;

  fg_state_e      state_q;
  logic [PW-1:0]  cnt_q;
  logic [AW-1:0]  addr_q;
  logic           sweep_req;

  assign f_valid  = (state_q == CLEAR) || (state_q == SWEEP);
  assign f_addr   = addr_q;
  assign f_delta  = (state_q == CLEAR) ? $signed({1'b1, {(DELTA_W-1){1'b0}}})
                                       : -$signed(DELTA_W'(quant));
  assign clearing = (state_q == CLEAR);

  assign sweep_req   = (state_q == COUNT) && (period != '0) && (cnt_q >= period - 1'b1);
  assign sweep_start = sweep_req && (quant != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= CLEAR;
      cnt_q   <= '0;
      addr_q  <= '0;
    end else begin
      unique case (state_q)
        CLEAR, SWEEP: if (f_ready) begin
          addr_q <= addr_q + 1'b1;
          if (addr_q == AW'(DEPTH - 1)) state_q <= COUNT;
        end
        COUNT: begin
          if (period == '0) begin
            cnt_q <= '0;
          end else if (sweep_req) begin
            cnt_q <= '0;
            if (quant != '0) state_q <= SWEEP;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= COUNT;
      endcase
    end
  end

endmodule
