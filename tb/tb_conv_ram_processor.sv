// tb_conv_ram_processor: drives the RAM-integrator processor only through
// its pins: SPI configuration frames, AER input spikes, AER output
// acknowledges. The integrator matrix is compared cell by cell with a
// reference model of Y(i+a, j+b) = clip(Y(i+a, j+b) + K(a,b), 0, 255),
// applied event by event.
//  A: the 3x3 vertical-edge kernel [-10 0 10] in every row on a bright
//     bar image;
//  B: an 11x11 kernel with events in corners and on edges, driving cells
//     into clipping at 255, plus the cycle cost of back-to-back events
//     (2*N*N + 1 per event);
//  C: forgetting with period and quantity set over SPI, checked against
//     the model after one sweep; then spikes during sweeps (stalls);
//  D: a kernel rewrite while events are processed (kernel-port conflict).
// Output spikes are checked to come only from non-zero cells.
module tb_conv_ram_processor;
  import aer_conv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_ack, out_req, out_ack = 0;
  logic [11:0] in_data = '0, out_data;
  logic sclk = 0, cs_n = 1, mosi = 0;
  logic st_stall, st_sat_hi, st_sat_lo, st_skip, st_sweep, st_kconflict, st_bad_frame, st_clearing;
  int checks = 0, failures = 0;
  int model [4096];
  int kern [121];
  int ksz = 11;
  int n_stall = 0, n_hi = 0, n_skip = 0, n_sweep = 0, n_kc = 0, n_out = 0, n_out_bad = 0;
  bit forgetting = 0;
  always #10 clk = ~clk;   // 50 MHz

  conv_ram_processor dut (.clk, .rst_n, .in_req, .in_data, .in_ack, .out_req, .out_data, .out_ack,
                          .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi),
                          .st_stall, .st_sat_hi, .st_sat_lo, .st_skip, .st_sweep, .st_kconflict,
                          .st_bad_frame, .st_clearing);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (st_stall) n_stall++;
    if (st_sat_hi) n_hi++;
    if (st_skip) n_skip++;
    if (st_sweep) n_sweep++;
    if (st_kconflict) n_kc++;
  end

  // AER output receiver
  initial forever begin
    @(posedge out_req);
    n_out++;
    if (!forgetting && dut.u_cells.mem[out_data] == 0) n_out_bad++;
    #($urandom_range(5, 60)) out_ack = 1;
    @(negedge out_req);
    #($urandom_range(5, 60)) out_ack = 0;
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
    for (int a = 0; a < n * n; a++) begin
      int r, c;
      r = a / n; c = a % n;
      spi_frame(OP_KERNEL, {9'd0, 7'(r * 11 + c), 8'(kern[r * 11 + c])});
    end
  endtask

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic model_event(int i, int j);
    int h;
    h = ksz / 2;
    for (int a = -h; a <= h; a++)
      for (int b = -h; b <= h; b++)
        if (i + a >= 0 && i + a < 64 && j + b >= 0 && j + b < 64)
          model[(i + a) * 64 + j + b] = clip(model[(i + a) * 64 + j + b] + kern[(a + h) * 11 + b + h]);
  endtask

  task automatic spike(int i, int j);
    in_data = {6'(i), 6'(j)};
    #3 in_req = 1;
    wait (in_ack);
    #3 in_req = 0;
    wait (!in_ack);
    model_event(i, j);
  endtask

  task automatic wait_idle();
    repeat (2) @(posedge clk);
    while (dut.u_eng.state_q != 0 || dut.u_rx.state_q != 0 || dut.u_upd.busy || dut.u_fgt.f_valid) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic compare(string tag);
    int bad;
    bad = 0;
    for (int a = 0; a < 4096; a++)
      if (int'(dut.u_cells.mem[a]) != model[a]) begin
        if (bad < 5) $display("%s: cell %0d = %0d want %0d", tag, a, dut.u_cells.mem[a], model[a]);
        bad++;
      end
    chk(bad == 0, $sformatf("%s: %0d cells differ", tag, bad));
  endtask

  initial begin
    #60ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(st_clearing, "clearing sweep after reset");
    wait (!st_clearing);
    repeat (2) @(posedge clk);
    for (int a = 0; a < 4096; a++) model[a] = 0;
    compare("after clearing");

    // A: Figure-1 edge kernel on a vertical bar
    for (int a = 0; a < 121; a++) kern[a] = 0;
    for (int r = 0; r < 3; r++) begin kern[r * 11 + 0] = -10; kern[r * 11 + 2] = 10; end
    load_kernel(3);
    for (int rep = 0; rep < 4; rep++)
      for (int i = 20; i < 30; i++)
        for (int j = 30; j < 34; j++) spike(i, j);
    wait_idle();
    compare("3x3 edge kernel");
    chk(model[25 * 64 + 34] > 0 && model[25 * 64 + 29] == 0, "edge response on one side only");

    // B: 11x11 kernel, corners and clipping
    for (int a = 0; a < 121; a++) kern[a] = $urandom_range(0, 254) - 127;
    kern[5 * 11 + 5] = 127;
    load_kernel(11);
    foreach (model[a]) model[a] = int'(dut.u_cells.mem[a]);
    spike(0, 0); spike(63, 63); spike(0, 63); spike(63, 0); spike(5, 40);
    for (int n = 0; n < 10; n++) spike(32, 32);
    wait_idle();
    compare("11x11 kernel");
    chk(n_hi > 0 && n_skip > 0, $sformatf("clipping (%0d) and out-of-image positions (%0d) seen", n_hi, n_skip));
    // back-to-back: 20 events queued as fast as the handshake allows
    @(posedge clk);
    t0 = $time;
    fork
      for (int n = 0; n < 20; n++) spike(10 + n, 20);
    join
    wait_idle();
    t1 = $time;
    $display("20 events of 11x11 in %0d cycles", (t1 - t0) / 20);
    chk((t1 - t0) / 20 <= 20 * 243 + 40 && (t1 - t0) / 20 >= 20 * 243, "11x11 events take 243 cycles each");
    compare("11x11 back-to-back");

    // C: forgetting, exact: one sweep with no traffic
    spi_frame(OP_FQUANT, 24'd9);
    forgetting = 1;
    spi_frame(OP_FPERIOD, 24'd20000);
    wait (st_sweep);
    wait (dut.u_fgt.f_valid);
    wait (!dut.u_fgt.f_valid);
    spi_frame(OP_FPERIOD, 24'd0);
    foreach (model[a]) model[a] = clip(model[a] - 9);
    wait_idle();
    compare("after one forgetting sweep");
    // spikes while sweeps run: the engine stalls but every spike completes
    spi_frame(OP_FPERIOD, 24'd100);
    for (int n = 0; n < 60; n++) spike($urandom_range(0, 63), $urandom_range(0, 63));
    spi_frame(OP_FPERIOD, 24'd0);
    wait (!dut.u_fgt.f_valid);
    wait_idle();
    chk(n_stall > 0, $sformatf("%0d stall cycles behind forgetting", n_stall));
    chk(n_sweep >= 2, $sformatf("%0d forgetting sweeps", n_sweep));
    forgetting = 0;

    // D: rewrite the same kernel while spikes are processed
    foreach (model[a]) model[a] = int'(dut.u_cells.mem[a]);
    fork
      for (int n = 0; n < 30; n++) spike(40, 10 + n);
      for (int a = 0; a < 30; a++) spi_frame(OP_KERNEL, {9'd0, 7'(a), 8'(kern[a])});
    join
    wait_idle();
    compare("kernel rewrite during spikes");
    chk(n_kc > 0, $sformatf("%0d kernel-port conflicts", n_kc));

    #20us;
    chk(n_out > 50 && n_out_bad == 0, $sformatf("%0d output spikes, %0d from zero cells", n_out, n_out_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
