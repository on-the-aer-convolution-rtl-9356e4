// cell_updater: saturating read-modify-write unit on port A of the
// integrator RAM, shared by the kernel-copy engine and the forgetting
// controller.
//
// A request carries a cell address, a signed DELTA_W-bit amount and a
// `skip` flag. The unit spends two cycles per request, as the document's
// single-adder design does: the first reads the cell, the second adds the
// amount, limits the result to 0..2**W-1 and writes it back. A skipped
// request (a kernel position falling outside the image) still takes its two
// cycles but writes nothing, so an event's cost does not depend on where it
// lands.
//
// Arbitration: the forgetting port (f_*) wins over the engine port (e_*)
// when both request in the same cycle; the engine then waits (a stall).
// Both ports are valid/ready: a request is taken in a cycle where valid
// and ready are both high, and ready is high only in the unit's first
// cycle. Fixed priority for forgetting is this design's choice, made so
// that heavy input traffic cannot starve the forgetting that prevents
// saturation.
//
// Event counters `n_sat_hi`/`n_sat_lo` pulse for one cycle when a write is
// clipped at the top or the bottom of the range.
module cell_updater
  import aer_conv_pkg::*;
#(
  parameter int unsigned W     = CELL_W,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // engine requests
  input  logic                      e_valid,
  output logic                      e_ready,
  input  logic [AW-1:0]             e_addr,
  input  logic signed [DELTA_W-1:0] e_delta,
  input  logic                      e_skip,
  // forgetting requests
  input  logic                      f_valid,
  output logic                      f_ready,
  input  logic [AW-1:0]             f_addr,
  input  logic signed [DELTA_W-1:0] f_delta,
  // RAM port A
  output logic                      ram_en,
  output logic                      ram_we,
  output logic [AW-1:0]             ram_addr,
  output logic [W-1:0]              ram_wdata,
  input  logic [W-1:0]              ram_rdata,
  // status
  output logic                      busy,
  output logic                      sat_hi,
  output logic                      sat_lo
);

  logic                      phase_q;   // 0: read cycle, 1: add/write cycle
  logic [AW-1:0]             addr_q;
  logic signed [DELTA_W-1:0] delta_q;
  logic                      skip_q;

  logic                      take_f, take_e;
  logic signed [W+1:0]       sum;

  assign f_ready = !phase_q;
  assign e_ready = !phase_q && !f_valid;
  assign take_f  = f_valid && f_ready;
  assign take_e  = e_valid && e_ready;
  assign busy    = phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= 1'b0;
      addr_q  <= '0;
      delta_q <= '0;
      skip_q  <= 1'b0;
    end else if (!phase_q) begin
      if (take_f) begin
        phase_q <= 1'b1;
        addr_q  <= f_addr;
        delta_q <= f_delta;
        skip_q  <= 1'b0;
      end else if (take_e) begin
        phase_q <= 1'b1;
        addr_q  <= e_addr;
        delta_q <= e_delta;
        skip_q  <= e_skip;
      end
    end else begin
      phase_q <= 1'b0;
    end
  end

  // W+2 signed bits hold 0..255 plus -256..255.
  assign sum = $signed({2'b00, ram_rdata}) + (W+2)'(delta_q);

  always_comb begin
    ram_en    = 1'b0;
    ram_we    = 1'b0;
    ram_addr  = addr_q;
    ram_wdata = '0;
    sat_hi    = 1'b0;
    sat_lo    = 1'b0;
    if (!phase_q) begin
      ram_en   = take_f || (take_e && !e_skip);
      ram_addr = take_f ? f_addr : e_addr;
    end else if (!skip_q) begin
      ram_en = 1'b1;
      ram_we = 1'b1;
      if (sum < 0) begin
        ram_wdata = '0;
        sat_lo    = 1'b1;
      end else if (sum > (W+2)'((1 << W) - 1)) begin
        ram_wdata = '1;
        sat_hi    = 1'b1;
      end else begin
        ram_wdata = sum[W-1:0];
      end
    end
  end

endmodule
