// tb_config_ctrl: presents configuration frames and checks the kernel
// write pulses, the kernel size, forgetting period and quantity registers,
// their reset values, and that malformed frames are refused.
module tb_config_ctrl;
  import aer_conv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic frame_valid = 0;
  logic [31:0] frame = '0;
  logic k_we, bad_frame;
  logic [6:0] k_waddr;
  logic signed [7:0] k_wdata;
  logic [3:0] ksize;
  logic [23:0] fperiod;
  logic [7:0] fquant;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  config_ctrl dut (.clk, .rst_n, .frame_valid, .frame, .k_we, .k_waddr, .k_wdata,
                   .ksize, .fperiod, .fquant, .bad_frame);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(logic [7:0] op, logic [23:0] pl);
    @(negedge clk);
    frame = {op, pl}; frame_valid = 1;
    @(negedge clk);
    frame_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(ksize == 4'd11 && fperiod == 0 && fquant == 0 && !k_we, "reset values");
    for (int a = 0; a < 121; a += 7) begin
      send(OP_KERNEL, {9'd0, 7'(a), 8'(a * 3 - 100)});
      chk(k_we && k_waddr == 7'(a) && k_wdata == 8'(a * 3 - 100), $sformatf("kernel write %0d", a));
      @(negedge clk);
      chk(!k_we, "kernel write lasts one cycle");
    end
    send(OP_KERNEL, {9'd0, 7'd121, 8'd5});
    chk(!k_we && bad_frame, "kernel index 121 refused");
    send(OP_KSIZE, 24'd3);
    chk(ksize == 4'd3, "kernel size 3");
    send(OP_KSIZE, 24'd4);
    chk(ksize == 4'd3 && bad_frame, "even kernel size refused");
    send(OP_KSIZE, 24'd13);
    chk(ksize == 4'd3 && bad_frame, "kernel size 13 refused");
    send(OP_FPERIOD, 24'h12_3456);
    chk(fperiod == 24'h12_3456, "forgetting period");
    send(OP_FQUANT, 24'h0000_17);
    chk(fquant == 8'h17, "forgetting quantity");
    send(8'h7F, 24'h0);
    chk(bad_frame && fquant == 8'h17 && fperiod == 24'h12_3456 && ksize == 4'd3, "unknown opcode changes nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
