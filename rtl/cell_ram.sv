// cell_ram: the integrator matrix Y, a dual-port RAM of DEPTH cells of W bits.
//
// Port A is a synchronous read/write port used for read-modify-write
// updates (kernel copies and forgetting): the read data of the address
// presented in one cycle appears in the next; a write stores at the clock
// edge. Port B is a synchronous read-only port for the output event
// generator, so output generation never competes with updates. A dual-port
// block RAM of 8-bit cells holding 64x64 integrators is what the document
// describes; the port roles are this design's choice. The array has no
// reset: the processor clears it with a sweep after reset.
module cell_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: read/write
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B: read
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
