// tb_aer_conv_top: end-to-end test of both processors at their default
// sizes (64x64 cells, kernels up to 11x11, 9 mapping slots per address),
// each in its own clock domain (50 MHz and 100 MHz), driven only through
// the top's pins.
//
// RAM-integrator processor: configured over SPI with the 3x3 vertical-edge
// kernel [-10 0 10] (in every row), fed with spikes of a 16x16 image with a
// bright square, then with an 11x11 kernel, forgetting and a kernel rewrite
// under traffic. The integrator matrix is compared with a reference model
// after each phase and the output spike stream is checked to come from
// non-zero cells.
//
// Mapper: the table maps every pixel (i,j) to (i,j) with R = 2, P = 1
// (positive) and to (i+1,j+1) with R = 1, P = 1/2 (negative), i.e. the
// kernel [2 0; 0 -0.5]. Positive counts per address must be exact; the
// negative total must be near half the number of spikes that map there.
//
// Every mechanism is counted and must occur at least once: engine stall
// behind forgetting, clipping at 255 and at 0, kernel positions outside
// the image, forgetting sweeps, kernel-port conflicts, refused frames, the
// clearing sweep, mapper repetitions, dropped draws, negative events and
// output back-pressure in both designs.
module tb_aer_conv_top;
  import aer_conv_pkg::*;
  logic conv_clk = 0, conv_rst_n = 0, map_clk = 0, map_rst_n = 0;
  logic conv_in_req = 0, conv_in_ack, conv_out_req, conv_out_ack = 0;
  logic [11:0] conv_in_data = '0, conv_out_data;
  logic sclk = 0, cs_n = 1, mosi = 0;
  logic [7:0] conv_status;
  logic map_in_req = 0, map_in_ack, map_out_req, map_out_ack = 0, map_sram_oe, map_dropped;
  logic [11:0] map_in_data = '0;
  logic [12:0] map_out_data;
  logic [15:0] map_sram_addr;
  logic [31:0] map_sram_rdata;
  int checks = 0, failures = 0;
  always #10 conv_clk = ~conv_clk;
  always #5  map_clk  = ~map_clk;

  aer_conv_top dut (
    .conv_clk, .conv_rst_n, .conv_in_req, .conv_in_data, .conv_in_ack,
    .conv_out_req, .conv_out_data, .conv_out_ack,
    .conv_spi_sclk(sclk), .conv_spi_cs_n(cs_n), .conv_spi_mosi(mosi), .conv_status,
    .map_clk, .map_rst_n, .map_in_req, .map_in_data, .map_in_ack,
    .map_out_req, .map_out_data, .map_out_ack,
    .map_sram_addr, .map_sram_oe, .map_sram_rdata, .map_dropped);
  sram_model #(.AW(16), .ACCESS_NS(12)) u_sram (.addr(map_sram_addr), .oe(map_sram_oe), .rdata(map_sram_rdata));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_sat_hi = 0, n_sat_lo = 0, n_skip = 0, n_sweep = 0, n_kc = 0, n_bad = 0, n_clear = 0;
  int n_conv_out = 0, n_conv_out_bad = 0, n_conv_bp = 0;
  int n_drop = 0, n_rep = 0, n_neg = 0, n_map_bp = 0;
  always @(posedge conv_clk) if (conv_rst_n) begin
    n_stall  += int'(conv_status[0]);
    n_sat_hi += int'(conv_status[1]);
    n_sat_lo += int'(conv_status[2]);
    n_skip   += int'(conv_status[3]);
    n_sweep  += int'(conv_status[4]);
    n_kc     += int'(conv_status[5]);
    n_bad    += int'(conv_status[6]);
    n_clear  += int'(conv_status[7]);
    n_conv_bp += int'(dut.u_conv.og_valid && !dut.u_conv.og_ready);
  end
  always @(posedge map_clk) if (map_rst_n) begin
    n_drop   += int'(map_dropped);
    n_map_bp += int'(dut.u_map.mo_valid && !dut.u_map.mo_ready);
    n_rep    += int'(dut.u_map.mo_valid && dut.u_map.mo_ready && dut.u_map.u_map.rep_q > 1);
  end

  // ---------------- RAM-integrator processor ----------------
  int model [4096];
  int kern [121];
  int ksz = 11;
  bit forgetting = 0;

  initial forever begin
    @(posedge conv_out_req);
    n_conv_out++;
    if (!forgetting && dut.u_conv.u_cells.mem[conv_out_data] == 0) n_conv_out_bad++;
    #($urandom_range(20, 200)) conv_out_ack = 1;
    @(negedge conv_out_req);
    #($urandom_range(20, 200)) conv_out_ack = 0;
  end

  task automatic spi_frame(logic [7:0] op, logic [23:0] pl);
    logic [31:0] w;
    w = {op, pl};
    cs_n = 0;
    #100;
    for (int b = 31; b >= 0; b--) begin
      mosi = w[b];
      #100 sclk = 1;
      #100 sclk = 0;
    end
    #100 cs_n = 1;
    #200;
  endtask

  task automatic load_kernel(int n);
    ksz = n;
    spi_frame(OP_KSIZE, 24'(n));
    for (int a = 0; a < n * n; a++)
      spi_frame(OP_KERNEL, {9'd0, 7'((a / n) * 11 + a % n), 8'(kern[(a / n) * 11 + a % n])});
  endtask

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic conv_spike(int i, int j);
    int h;
    conv_in_data = {6'(i), 6'(j)};
    #3 conv_in_req = 1;
    wait (conv_in_ack);
    #3 conv_in_req = 0;
    wait (!conv_in_ack);
    h = ksz / 2;
    for (int a = -h; a <= h; a++)
      for (int b = -h; b <= h; b++)
        if (i + a >= 0 && i + a < 64 && j + b >= 0 && j + b < 64)
          model[(i + a) * 64 + j + b] = clip(model[(i + a) * 64 + j + b] + kern[(a + h) * 11 + b + h]);
  endtask

  task automatic conv_idle();
    repeat (2) @(posedge conv_clk);
    while (dut.u_conv.u_eng.state_q != 0 || dut.u_conv.u_rx.state_q != 0 ||
           dut.u_conv.u_upd.busy || dut.u_conv.u_fgt.f_valid) @(posedge conv_clk);
    repeat (2) @(posedge conv_clk);
  endtask

  task automatic conv_compare(string tag);
    int bad;
    bad = 0;
    for (int a = 0; a < 4096; a++)
      if (int'(dut.u_conv.u_cells.mem[a]) != model[a]) bad++;
    chk(bad == 0, $sformatf("conv %s: %0d cells differ from the model", tag, bad));
  endtask

  task automatic run_conv();
    wait (conv_rst_n);
    @(posedge conv_clk);
    wait (!conv_status[7]);
    repeat (2) @(posedge conv_clk);
    foreach (model[a]) model[a] = 0;
    conv_compare("after clearing");
    spi_frame(OP_KSIZE, 24'd4);                          // refused: even size
    foreach (kern[a]) kern[a] = 0;
    for (int r = 0; r < 3; r++) begin kern[r * 11] = -10; kern[r * 11 + 2] = 10; end
    load_kernel(3);
    // 16x16 image at rows/cols 0..15: grey 1, a square of grey 5
    for (int g = 0; g < 5; g++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          if (g == 0 || (i >= 4 && i < 12 && j >= 5 && j < 11)) conv_spike(i, j);
    conv_idle();
    conv_compare("3x3 edge kernel");
    chk(model[8 * 64 + 11] > model[8 * 64 + 4], "the square's right edge responds, the left one does not");
    // 11x11 kernel with strong centre
    foreach (kern[a]) kern[a] = $urandom_range(0, 200) - 100;
    kern[60] = 127;
    load_kernel(11);
    foreach (model[a]) model[a] = int'(dut.u_conv.u_cells.mem[a]);
    for (int n = 0; n < 8; n++) conv_spike(40, 40);
    conv_spike(63, 0);
    conv_idle();
    conv_compare("11x11 kernel");
    // forgetting with traffic
    forgetting = 1;
    spi_frame(OP_FQUANT, 24'd3);
    spi_frame(OP_FPERIOD, 24'd200);
    for (int n = 0; n < 40; n++) conv_spike($urandom_range(0, 63), $urandom_range(0, 63));
    spi_frame(OP_FPERIOD, 24'd0);
    conv_idle();
    forgetting = 0;
    // kernel rewrite (same weights) under traffic
    foreach (model[a]) model[a] = int'(dut.u_conv.u_cells.mem[a]);
    fork
      for (int n = 0; n < 20; n++) conv_spike(20, 20 + n);
      for (int a = 0; a < 20; a++) spi_frame(OP_KERNEL, {9'd0, 7'(a), 8'(kern[a])});
    join
    conv_idle();
    conv_compare("kernel rewrite under traffic");
    #30us;
  endtask

  // ---------------- probabilistic mapper ----------------
  int pos_cnt [4096];
  int neg_total = 0;
  int map_sent [4096];

  initial forever begin
    @(posedge map_out_req);
    if (map_out_data[12]) begin n_neg++; neg_total++; end
    else pos_cnt[map_out_data[11:0]]++;
    #($urandom_range(5, 80)) map_out_ack = 1;
    @(negedge map_out_req);
    #($urandom_range(5, 80)) map_out_ack = 0;
  end

  function automatic logic [31:0] ent(bit last, int rep, int prob, bit sgn, int addr);
    map_entry_t e;
    e = '0;
    e.valid = 1; e.last = last; e.rep = 4'(rep); e.prob = 8'(prob);
    e.event_ = {sgn, 12'(addr)};
    return 32'(e);
  endfunction

  task automatic run_map();
    int neg_possible;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int a;
        a = i * 64 + j;
        u_sram.mem[a * 9] = ent(!(i < 63 && j < 63), 2, 255, 0, a);
        if (i < 63 && j < 63) u_sram.mem[a * 9 + 1] = ent(1, 1, 127, 1, (i + 1) * 64 + j + 1);
      end
    wait (map_rst_n);
    neg_possible = 0;
    for (int g = 0; g < 8; g++)
      for (int i = 0; i < 64; i += 3)
        for (int j = 0; j < 64; j += 2)
          if (g < 2 || (i > 20 && i < 40)) begin
            map_in_data = {6'(i), 6'(j)};
            #2 map_in_req = 1;
            wait (map_in_ack);
            #2 map_in_req = 0;
            wait (!map_in_ack);
            map_sent[i * 64 + j]++;
            if (i < 63 && j < 63) neg_possible++;
          end
    #5us;
    begin
      int bad;
      bad = 0;
      for (int a = 0; a < 4096; a++) if (pos_cnt[a] != 2 * map_sent[a]) bad++;
      chk(bad == 0, $sformatf("mapper: %0d addresses with a wrong positive count", bad));
    end
    chk(real'(neg_total) > 0.45 * neg_possible && real'(neg_total) < 0.55 * neg_possible,
        $sformatf("mapper: %0d negative events for %0d spikes at P=1/2", neg_total, neg_possible));
  endtask

  initial begin
    #80ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    conv_rst_n = 1;
    map_rst_n = 1;
    fork
      run_conv();
      run_map();
    join
    chk(n_conv_out > 20 && n_conv_out_bad == 0, $sformatf("conv: %0d output spikes, %0d from zero cells", n_conv_out, n_conv_out_bad));
    $display("mechanisms: stall %0d, clip255 %0d, clip0 %0d, outside %0d, sweeps %0d, kernel conflicts %0d, refused frames %0d, clearing %0d, conv back-pressure %0d",
             n_stall, n_sat_hi, n_sat_lo, n_skip, n_sweep, n_kc, n_bad, n_clear, n_conv_bp);
    $display("mechanisms: mapper repetitions %0d, dropped %0d, negative %0d, back-pressure %0d", n_rep, n_drop, n_neg, n_map_bp);
    chk(n_stall > 0, "engine stall behind forgetting");
    chk(n_sat_hi > 0, "clipping at 255");
    chk(n_sat_lo > 0, "clipping at 0");
    chk(n_skip > 0, "kernel positions outside the image");
    chk(n_sweep > 0, "forgetting sweeps");
    chk(n_kc > 0, "kernel-port conflicts");
    chk(n_bad > 0, "refused configuration frame");
    chk(n_clear > 0, "clearing sweep");
    chk(n_conv_bp > 0, "output back-pressure (RAM-integrator)");
    chk(n_rep > 0, "mapper repetitions");
    chk(n_drop > 0, "mapper dropped draws");
    chk(n_neg > 0, "mapper negative events");
    chk(n_map_bp > 0, "output back-pressure (mapper)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
