// tb_cell_updater: drives random engine and forgetting requests at the
// updater in front of a real cell RAM and compares every cell with a
// reference model of the saturating update. Also checks that forgetting
// wins a tie, that skipped requests write nothing, the clip flags, and
// that back-to-back requests complete one every two cycles.
module tb_cell_updater;
  logic clk = 0, rst_n = 0;
  logic e_valid = 0, e_ready, e_skip = 0, f_valid = 0, f_ready;
  logic [11:0] e_addr = '0, f_addr = '0;
  logic signed [8:0] e_delta = '0, f_delta = '0;
  logic ram_en, ram_we, busy, sat_hi, sat_lo;
  logic [11:0] ram_addr;
  logic [7:0] ram_wdata, ram_rdata;
  logic b_en = 0;
  logic [11:0] b_addr = '0;
  logic [7:0] b_rdata;
  int checks = 0, failures = 0;
  int model [4096];
  int n_hi = 0, n_lo = 0, n_done = 0;
  always #5 clk = ~clk;

  cell_updater dut (.clk, .rst_n, .e_valid, .e_ready, .e_addr, .e_delta, .e_skip,
                    .f_valid, .f_ready, .f_addr, .f_delta,
                    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
                    .busy, .sat_hi, .sat_lo);
  cell_ram u_ram (.clk, .a_en(ram_en), .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata),
                  .a_rdata(ram_rdata), .b_en, .b_addr, .b_rdata);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int sat(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (sat_hi) n_hi++;
    if (sat_lo) n_lo++;
  end

  // one request through the engine port; returns cycles until accepted
  task automatic ereq(int a, int d, bit skip);
    @(negedge clk);
    e_addr = 12'(a); e_delta = 9'(d); e_skip = skip; e_valid = 1;
    @(posedge clk);
    while (!e_ready) @(posedge clk);
    if (!skip) model[a] = sat(model[a] + d);
    @(negedge clk);
    e_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clear the RAM through the forgetting port with the largest decrement
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      f_addr = 12'(a); f_delta = -9'sd256; f_valid = 1;
      @(posedge clk);
      while (!f_ready) @(posedge clk);
      model[a] = 0;
    end
    @(negedge clk);
    f_valid = 0;
    // random engine updates on a small window so that cells clip
    for (int n = 0; n < 3000; n++) begin
      int a, d;
      a = $urandom_range(0, 31);
      d = $urandom_range(0, 254) - 127;
      ereq(a, d, ($urandom_range(0, 9) == 0));
    end
    // drive one cell to the top and one to the bottom of the range
    for (int n = 0; n < 3; n++) ereq(50, 127, 0);
    for (int n = 0; n < 3; n++) ereq(51, -127, 0);
    ereq(51, 4, 0);
    @(negedge clk);
    @(negedge clk);
    b_en = 1; b_addr = 12'd50;
    @(negedge clk);
    chk(b_rdata == 8'd255, $sformatf("cell driven past the top holds 255, got %0d", b_rdata));
    b_addr = 12'd51;
    @(negedge clk);
    chk(b_rdata == 8'd4, $sformatf("cell driven below zero then +4 holds 4, got %0d", b_rdata));
    b_en = 0;
    // tie: both ports request in the same cycle, forgetting goes first
    @(negedge clk);
    e_addr = 12'd40; e_delta = 9'sd50; e_skip = 0; e_valid = 1;
    f_addr = 12'd40; f_delta = -9'sd10; f_valid = 1;
    @(posedge clk); #1;
    chk(ram_addr == 12'd40 && busy, "forgetting request taken first");
    @(negedge clk);
    f_valid = 0;
    chk(!e_ready, "engine waits during the forgetting write");
    while (!(e_valid && e_ready)) @(negedge clk);
    @(negedge clk);
    e_valid = 0;
    model[40] = sat(sat(0 - 10) + 50);
    // throughput: 20 back-to-back requests
    @(negedge clk);
    t0 = $time;
    for (int n = 0; n < 20; n++) begin
      e_addr = 12'(100 + n); e_delta = 9'sd3; e_skip = 0; e_valid = 1;
      @(posedge clk);
      while (!e_ready) @(posedge clk);
      model[100 + n] = 3;
      @(negedge clk);
    end
    t1 = $time;
    e_valid = 0;
    chk((t1 - t0) == (2 * 20 - 1) * 10, $sformatf("20 requests accepted over %0d ns, want 390 (two cycles each)", t1 - t0));
    @(negedge clk);
    @(negedge clk);
    for (int a = 0; a < 128; a++) begin
      b_en = 1; b_addr = 12'(a);
      @(negedge clk);
      chk(int'(b_rdata) == model[a], $sformatf("cell %0d = %0d want %0d", a, b_rdata, model[a]));
    end
    chk(n_hi > 0 && n_lo > 0, $sformatf("clipping seen high %0d low %0d", n_hi, n_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
