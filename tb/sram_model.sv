// sram_model: behavioural model of an asynchronous SRAM read port, for
// simulation only. Data follow the address after ACCESS_NS; the array is
// filled by the testbench through hierarchical access to `mem`.
module sram_model #(
  parameter int unsigned AW        = 16,
  parameter int unsigned ACCESS_NS = 12
) (
  input  logic [AW-1:0] addr,
  input  logic          oe,
  output logic [31:0]   rdata
);
  logic [31:0] mem [2 ** AW];
  initial for (int a = 0; a < 2 ** AW; a++) mem[a] = '0;
  always @(addr or oe) begin
    rdata <= #(ACCESS_NS * 1ns) (oe ? mem[addr] : 32'hDEAD_BEEF);
  end
endmodule
