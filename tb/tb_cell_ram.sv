// tb_cell_ram: fills the 4096 cells through port A, reads them back through
// both ports, and checks read-before-write on port A.
module tb_cell_ram;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0;
  logic [11:0] a_addr = '0, b_addr = '0;
  logic [7:0] a_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cell_ram dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_addr, .b_rdata);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] val(int a);
    return 8'(a * 7 + (a >> 5));
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 4096; a++) begin
      a_en = 1; a_we = 1; a_addr = 12'(a); a_wdata = val(a);
      @(negedge clk);
    end
    a_we = 0;
    for (int k = 0; k < 4096; k++) begin
      a_addr = 12'(k); b_addr = 12'(4095 - k); b_en = 1;
      @(negedge clk);
      chk(a_rdata == val(k), $sformatf("port A cell %0d", k));
      chk(b_rdata == val(4095 - k), $sformatf("port B cell %0d", 4095 - k));
    end
    // read-before-write on port A, port B sees the new value next cycle
    a_addr = 12'd100; a_we = 1; a_wdata = 8'hA5; b_addr = 12'd100;
    @(negedge clk);
    chk(a_rdata == val(100), "port A returns the old value while writing");
    a_we = 0;
    @(negedge clk);
    chk(a_rdata == 8'hA5 && b_rdata == 8'hA5, "new value visible on both ports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
