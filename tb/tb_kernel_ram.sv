// tb_kernel_ram: writes all 121 signed weights, reads them back in a
// scrambled order and checks that the output holds while `en` is low and
// during a write.
module tb_kernel_ram;
  logic clk = 0;
  logic en = 0, we = 0;
  logic [6:0] addr = '0;
  logic signed [7:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  kernel_ram dut (.clk, .en, .we, .addr, .wdata, .rdata);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic signed [7:0] val(int a);
    return 8'((a * 37 + 11) % 255 - 127);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 121; a++) begin
      en = 1; we = 1; addr = 7'(a); wdata = val(a);
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 121; k++) begin
      int a;
      a = (k * 53) % 121;
      en = 1; addr = 7'(a);
      @(negedge clk);
      chk(rdata == val(a), $sformatf("read %0d got %0d want %0d", a, rdata, val(a)));
    end
    en = 0; addr = 7'd0;
    repeat (2) @(negedge clk);
    chk(rdata == val((120 * 53) % 121), "output holds while disabled");
    en = 1; we = 1; addr = 7'd3; wdata = 8'sd99;
    @(negedge clk);
    chk(rdata == val((120 * 53) % 121), "output holds during a write");
    we = 0;
    @(negedge clk);
    chk(rdata == 8'sd99, "written value reads back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
