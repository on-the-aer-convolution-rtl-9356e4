// tb_forget_ctrl: checks the clearing sweep after reset (every cell once,
// in order, with the largest decrement), that nothing is requested while
// forgetting is off, that with period P and quantity Q a sweep of all cells
// by -Q starts P cycles after the previous one ended, and that a new
// period value is followed.
module tb_forget_ctrl;
  localparam int D = 4096;
  logic clk = 0, rst_n = 0;
  logic [23:0] period = '0;
  logic [7:0] quant = '0;
  logic f_valid, f_ready, clearing, sweep_start;
  logic [11:0] f_addr;
  logic signed [8:0] f_delta;
  logic busy = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  forget_ctrl #(.DEPTH(D)) dut (.clk, .rst_n, .period, .quant, .f_valid, .f_ready, .f_addr,
                                .f_delta, .clearing, .sweep_start);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // the updater takes a request every other cycle
  assign f_ready = !busy;
  always @(posedge clk) busy <= f_valid && f_ready;

  // collect one sweep; returns the cycle after its last request
  task automatic sweep(int want_delta, string name);
    int nxt, bad;
    nxt = 0; bad = 0;
    // called between clock edges; samples the request before each edge
    while (nxt < D) begin
      if (f_valid && f_ready) begin
        if (int'(f_addr) != nxt || int'(f_delta) != want_delta) bad++;
        nxt++;
      end
      @(negedge clk);
    end
    chk(bad == 0, $sformatf("%s: %0d wrong requests", name, bad));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, gap;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 chk(clearing && f_valid, "clearing starts after reset");
    sweep(-256, "clearing sweep");
    @(negedge clk);
    @(negedge clk);
    chk(!clearing && !f_valid, "clearing ends");
    // forgetting off
    t = 0;
    repeat (500) begin @(posedge clk); if (f_valid) t++; end
    chk(t == 0, "no requests while the period is 0");
    // period 1000, quantity 7: the first request comes 1000 cycles later
    @(negedge clk);
    quant = 8'd7; period = 24'd1000;
    gap = 0;
    while (!f_valid) begin @(negedge clk); gap++; end
    chk(gap == 1000, $sformatf("first sweep after %0d cycles, want 1000", gap));
    sweep(-7, "forgetting sweep 1");
    // the sweep ended at the last clock edge: count from here
    period = 24'd300;
    gap = 0;
    while (!f_valid) begin @(negedge clk); gap++; end
    chk(gap == 300, $sformatf("next sweep after %0d cycles, want 300", gap));
    sweep(-7, "forgetting sweep 2");
    // quantity 0: no sweep
    @(negedge clk);
    quant = 8'd0;
    t = 0;
    repeat (1000) begin @(posedge clk); if (f_valid) t++; end
    chk(t == 0, "no sweep with quantity 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
