// kernel_ram: single-port RAM holding the convolution kernel.
//
// DEPTH signed W-bit weights (11x11 = 121 entries of 8 bits). Weight K(r,c)
// of an NxN kernel lives at address r*KMAX + c, r and c counted from the
// kernel's top-left corner (this layout is this design's choice). One port
// serves both the configuration writes and the engine's reads: a write
// takes the port for that cycle. Reads are synchronous: data for the
// address given with `en` high appears after the clock edge and holds while
// `en` is low. A write leaves the read output unchanged (the no-change mode
// of FPGA block RAMs), so a weight already fetched by the engine survives a
// configuration write.
module kernel_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 121,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                en,
  input  logic                we,
  input  logic [AW-1:0]       addr,
  input  logic signed [W-1:0] wdata,
  output logic signed [W-1:0] rdata
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end

endmodule
