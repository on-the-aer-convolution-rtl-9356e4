// poisson_gen: random synthetic AER generator reading the integrator matrix.
//
// Every draw takes a pseudo-random cell address and a pseudo-random
// threshold from an LFSR, reads the cell through the RAM's read-only port
// and, when the cell value is above the threshold, emits an output event
// with that cell's address. A cell holding value Y is therefore emitted
// with probability Y/2**W per draw, independently of the other cells and of
// time, which gives each address a Poisson-like spike train with a rate
// proportional to its value. The document says only that the matrix is read
// by a random AER synthetic generator to obtain Poisson-distributed output;
// this draw-and-compare scheme is the simplest that does it.
//
// Timing: a draw takes two cycles (read, compare); a hit then waits on the
// output stream until it is taken. No draw starts while `en` is low; the
// processor holds it low while the matrix is being cleared after reset.
module poisson_gen
  import aer_conv_pkg::*;
#(
  parameter int unsigned W     = CELL_W,
  parameter int unsigned DEPTH = 4096,
  parameter logic [31:0] SEED  = 32'h5EED_C0DE,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,          // draws start only while high
  // RAM port B
  output logic          ram_en,
  output logic [AW-1:0] ram_addr,
  input  logic [W-1:0]  ram_rdata,
  // output events
  output logic          ev_valid,
  output logic [AW-1:0] ev_addr,
  input  logic          ev_ready
);

  typedef enum logic [1:0] {DRAW, CMP, EMIT} pg_state_e;

  pg_state_e         state_q;
  logic [AW+W-1:0]   rnd;
  logic [W-1:0]      thr_q;
  logic [AW-1:0]     addr_q;

  lfsr #(.OUT_W(AW + W), .STEP(AW + W), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (state_q == DRAW && en),
    .rnd  (rnd)
  );

  assign ram_en   = (state_q == DRAW) && en;
  assign ram_addr = rnd[AW-1:0];
  assign ev_valid = (state_q == EMIT);
  assign ev_addr  = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= DRAW;
      thr_q   <= '0;
      addr_q  <= '0;
    end else begin
      unique case (state_q)
        DRAW: if (en) begin
          addr_q  <= rnd[AW-1:0];
          thr_q   <= rnd[AW+W-1:AW];
          state_q <= CMP;
        end
        CMP:  state_q <= (ram_rdata > thr_q) ? EMIT : DRAW;
        EMIT: if (ev_ready) state_q <= DRAW;
        default: state_q <= DRAW;
      endcase
    end
  end

endmodule
