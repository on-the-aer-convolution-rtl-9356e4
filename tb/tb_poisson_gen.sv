// tb_poisson_gen: the generator reads a RAM model whose quarters hold 0,
// 64, 128 and 255. Over many draws it checks that no address of a zero
// cell is emitted, that the fraction of draws that emit matches the mean
// cell value / 256, that each quarter's share of the events is in
// proportion to its value, and that an event waits, unchanged, for a
// consumer that is not ready, and that nothing is drawn while disabled.
module tb_poisson_gen;
  logic clk = 0, rst_n = 0;
  logic ram_en, ev_valid, ev_ready = 0, en = 0;
  logic [11:0] ram_addr, ev_addr;
  logic [7:0] ram_rdata;
  logic [7:0] mem [4096];
  int checks = 0, failures = 0;
  int draws = 0, hits = 0, zero_hits = 0, held_bad = 0;
  int quarter [4];
  logic [11:0] prev_addr;
  logic prev_wait = 0;
  always #5 clk = ~clk;

  poisson_gen dut (.clk, .rst_n, .en, .ram_en, .ram_addr, .ram_rdata, .ev_valid, .ev_addr, .ev_ready);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int qval(int q);
    case (q) 0: return 0; 1: return 64; 2: return 128; default: return 255; endcase
  endfunction

  always @(posedge clk) if (ram_en) ram_rdata <= mem[ram_addr];
  always @(negedge clk) ev_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n) begin
    if (ram_en) draws++;
    if (prev_wait && ev_addr != prev_addr) held_bad++;
    prev_wait <= ev_valid && !ev_ready;
    prev_addr <= ev_addr;
    if (ev_valid && ev_ready) begin
      hits++;
      quarter[ev_addr[11:10]]++;
      if (mem[ev_addr] == 0) zero_hits++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real frac, want;
    for (int a = 0; a < 4096; a++) mem[a] = 8'(qval(a >> 10));
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    chk(draws == 0 && hits == 0, "no draws while disabled");
    en = 1;
    repeat (200000) @(posedge clk);
    frac = real'(hits) / real'(draws);
    want = real'(0 + 64 + 128 + 255) / 4.0 / 256.0;
    $display("draws %0d hits %0d fraction %f expected %f; quarters %0d %0d %0d %0d",
             draws, hits, frac, want, quarter[0], quarter[1], quarter[2], quarter[3]);
    chk(draws > 50000, "enough draws");
    chk(zero_hits == 0 && quarter[0] == 0, "no event from a zero cell");
    chk(frac > want * 0.95 && frac < want * 1.05, "emit fraction tracks the mean cell value");
    chk(real'(quarter[2]) / real'(quarter[1]) > 1.8 && real'(quarter[2]) / real'(quarter[1]) < 2.2, "128 vs 64 rate ratio near 2");
    chk(real'(quarter[3]) / real'(quarter[1]) > 3.6 && real'(quarter[3]) / real'(quarter[1]) < 4.4, "255 vs 64 rate ratio near 4");
    chk(held_bad == 0, "event held while the consumer is not ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
