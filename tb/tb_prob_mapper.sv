// tb_prob_mapper: the mapper core reads a mapping table held in an SRAM
// model. Checks, with an always-ready output:
//  * certain entries (P = 255): exact output lists, repetitions, signs,
//    the `last` flag, the MAP_SLOTS limit, invalid words and R = 0 words;
//  * the cycle count of every event, 1 + sum over words of
//    (SRAM_WAIT + 1 + R + copies sent);
//  * the 2x2 kernel K1 = [0.1 0.05; 0.75 0.1] coded as R = 1 and P = K:
//    the number of copies of each mapped event over 4000 input events is
//    close to 4000*K;
//  * R = 2, P = 1/2 gives one copy per event on average.
// A second pass holds the output not-ready at random and checks nothing
// is lost.
module tb_prob_mapper;
  import aer_conv_pkg::*;
  localparam int SLOTS = 9, WAITC = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, sram_oe, dropped;
  logic [11:0] in_addr = '0;
  logic [15:0] sram_addr;
  logic [31:0] sram_rdata;
  logic [12:0] out_event;
  int checks = 0, failures = 0;
  int outs [$];
  bit rnd_ready = 0;
  int n_drop = 0;
  always #5 clk = ~clk;

  prob_mapper #(.MAP_SLOTS(SLOTS), .SRAM_WAIT(WAITC)) dut (
    .clk, .rst_n, .in_valid, .in_addr, .in_ready, .sram_addr, .sram_oe, .sram_rdata,
    .out_valid, .out_event, .out_ready, .dropped);
  sram_model #(.AW(16), .ACCESS_NS(12)) u_sram (.addr(sram_addr), .oe(sram_oe), .rdata(sram_rdata));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] ent(bit valid, bit last, int rep, int prob, bit sgn, int addr);
    map_entry_t e;
    e = '0;
    e.valid = valid; e.last = last; e.rep = 4'(rep); e.prob = 8'(prob);
    e.event_ = {sgn, 12'(addr)};
    return 32'(e);
  endfunction

  always @(negedge clk) out_ready <= rnd_ready ? ($urandom_range(0, 2) == 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) outs.push_back(int'(out_event));
    if (dropped) n_drop++;
  end

  // send one event, return the cycles from acceptance to ready again
  task automatic map_event(int a, output int cycles);
    @(negedge clk);
    in_addr = 12'(a); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    cycles = 1;
    while (!in_ready) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, want;
    int cnt [4];
    int kw [4] = '{100, 50, 750, 100};   // K1 in thousandths
    // address 5: three words, R = 1, 2, 3, the last one marked last
    u_sram.mem[5*SLOTS+0] = ent(1, 0, 1, 255, 0, 100);
    u_sram.mem[5*SLOTS+1] = ent(1, 0, 2, 255, 1, 200);
    u_sram.mem[5*SLOTS+2] = ent(1, 1, 3, 255, 0, 300);
    u_sram.mem[5*SLOTS+3] = ent(1, 1, 1, 255, 0, 999);   // beyond last: never read
    // address 6: all nine slots, no last flag
    for (int s = 0; s < SLOTS; s++) u_sram.mem[6*SLOTS+s] = ent(1, 0, 1, 255, s[0], 1000 + s);
    // address 7: empty list; address 8: an R = 0 word first
    u_sram.mem[7*SLOTS+0] = ent(0, 0, 1, 255, 0, 7);
    u_sram.mem[8*SLOTS+0] = ent(1, 0, 0, 255, 0, 8);
    u_sram.mem[8*SLOTS+1] = ent(1, 1, 1, 255, 1, 88);
    // address 9: K1 as four words; address 10: R = 2, P = 1/2
    for (int s = 0; s < 4; s++)
      u_sram.mem[9*SLOTS+s] = ent(1, s == 3, 1, (kw[s] * 256 + 500) / 1000 - 1, 0, 2000 + s);
    u_sram.mem[10*SLOTS+0] = ent(1, 1, 2, 127, 1, 3000);
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int pass = 0; pass < 2; pass++) begin
      rnd_ready = (pass == 1);
      outs.delete();
      map_event(5, c);
      if (!pass) chk(c == 1 + 3 * (WAITC + 1) + 6 + 6, $sformatf("address 5 took %0d cycles", c));
      @(negedge clk);
      chk(outs.size() == 6, $sformatf("address 5 gives %0d events, want 6", outs.size()));
      if (outs.size() == 6)
        chk(outs[0] == 100 && outs[1] == 4096 + 200 && outs[2] == 4096 + 200 &&
            outs[3] == 300 && outs[4] == 300 && outs[5] == 300, "address 5 list, repetitions and signs");
      outs.delete();
      map_event(6, c);
      if (!pass) chk(c == 1 + 9 * (WAITC + 1 + 1 + 1), $sformatf("address 6 took %0d cycles", c));
      @(negedge clk);
      chk(outs.size() == 9, $sformatf("address 6 gives %0d events, want 9", outs.size()));
      for (int s = 0; s < outs.size(); s++)
        chk(outs[s] == (s % 2) * 4096 + 1000 + s, $sformatf("address 6 slot %0d", s));
      outs.delete();
      map_event(7, c);
      if (!pass) chk(c == 1 + WAITC + 1, $sformatf("address 7 took %0d cycles", c));
      map_event(8, c);
      if (!pass) chk(c == 1 + (WAITC + 1 + 1) + (WAITC + 1 + 1 + 1), $sformatf("address 8 took %0d cycles", c));
      @(negedge clk);
      chk(outs.size() == 1 && outs[0] == 4096 + 88, "empty list sends nothing, R = 0 word sends nothing");
    end

    // statistics
    rnd_ready = 0;
    outs.delete();
    n_drop = 0;
    for (int n = 0; n < 4000; n++) begin
      int n_before;
      n_before = outs.size();
      map_event(9, c);
      @(negedge clk);
      want = 1 + 4 * (WAITC + 1 + 1) + (outs.size() - n_before);
      if (c != want) chk(0, $sformatf("K1 event %0d took %0d cycles, want %0d", n, c, want));
    end
    chk(1, "K1 event timing");
    foreach (outs[k]) cnt[outs[k] - 2000]++;
    for (int s = 0; s < 4; s++) begin
      real r;
      r = real'(cnt[s]) / 4.0;
      $display("K1 word %0d: %0d copies per 1000 events, weight %0d", s, int'(r), kw[s]);
      chk(r > kw[s] * 0.85 - 10 && r < kw[s] * 1.15 + 10, $sformatf("K1 word %0d rate", s));
    end
    chk(n_drop == 4 * 4000 - outs.size(), "every failed draw is flagged as dropped");
    outs.delete();
    for (int n = 0; n < 2000; n++) map_event(10, c);
    @(negedge clk);
    chk(outs.size() > 1850 && outs.size() < 2150, $sformatf("R=2 P=1/2: %0d copies for 2000 events", outs.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
