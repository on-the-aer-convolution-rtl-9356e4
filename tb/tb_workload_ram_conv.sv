// tb_workload_ram_conv: the RAM-integrator processor at its default size
// on the evaluation workloads of that design.
//
// 1. Kernel sizes 3, 5, 7, 9 and 11: 30 back-to-back spikes each, with a
//    sender that answers at once. The time per spike must be 2*N*N + 1
//    cycles; the equivalent rate, 50 MHz * N*N / (2*N*N + 1), is printed
//    next to the published single-adder figures (20.5, 23.1, 24.0, 24.4 and
//    24.6 MOPS), which include the bus handshake.
// 2. Edge detection on a 64x64 bitmap and on its negative with the 3x3
//    kernel [-10 0 10] in every row. The bitmap is a ring with a vertical
//    stem, grey levels 0..3, each pixel sent as that many spikes in
//    interleaved rounds. The integrator matrix must equal the clipped
//    convolution computed here. 512K output spikes are then collected into a
//    histogram, which must correlate with the matrix (Pearson r > 0.9). The
//    matrix is emptied between the two images by a forgetting sweep. The two
//    images must give opposite responses: where one has a rising edge the
//    other has a falling edge.
module tb_workload_ram_conv;
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
  int hist [4096];
  bit collect = 0;
  int n_collected = 0;
  int img [64][64];
  always #10 clk = ~clk;   // 50 MHz

  conv_ram_processor dut (.clk, .rst_n, .in_req, .in_data, .in_ack, .out_req, .out_data, .out_ack,
                          .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi),
                          .st_stall, .st_sat_hi, .st_sat_lo, .st_skip, .st_sweep, .st_kconflict,
                          .st_bad_frame, .st_clearing);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // fast AER output receiver building a histogram
  initial forever begin
    @(posedge out_req);
    if (collect) begin hist[out_data]++; n_collected++; end
    #1 out_ack = 1;
    @(negedge out_req);
    #1 out_ack = 0;
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

  task automatic spike(int i, int j);
    int h;
    in_data = {6'(i), 6'(j)};
    #1 in_req = 1;
    wait (in_ack);
    #1 in_req = 0;
    wait (!in_ack);
    h = ksz / 2;
    for (int a = -h; a <= h; a++)
      for (int b = -h; b <= h; b++)
        if (i + a >= 0 && i + a < 64 && j + b >= 0 && j + b < 64)
          model[(i + a) * 64 + j + b] = clip(model[(i + a) * 64 + j + b] + kern[(a + h) * 11 + b + h]);
  endtask

  task automatic idle();
    repeat (2) @(posedge clk);
    while (dut.u_eng.state_q != 0 || dut.u_rx.state_q != 0 || dut.u_upd.busy || dut.u_fgt.f_valid) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic compare(string tag);
    int bad;
    bad = 0;
    for (int a = 0; a < 4096; a++) if (int'(dut.u_cells.mem[a]) != model[a]) bad++;
    chk(bad == 0, $sformatf("%s: %0d cells differ from the clipped convolution", tag, bad));
  endtask

  // empty the matrix with one forgetting sweep of quantity 255
  task automatic flush();
    spi_frame(OP_FQUANT, 24'd255);
    spi_frame(OP_FPERIOD, 24'd1);
    wait (dut.u_fgt.f_valid);
    spi_frame(OP_FPERIOD, 24'd0);
    idle();
    foreach (model[a]) model[a] = 0;
  endtask

  task automatic send_image(bit negative);
    for (int g = 0; g < 3; g++)
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++)
          if ((negative ? 3 - img[i][j] : img[i][j]) > g) spike(i, j);
  endtask

  task automatic histogram_vs_matrix(string tag);
    real sx, sy, sxx, syy, sxy, r, n;
    foreach (hist[a]) hist[a] = 0;
    n_collected = 0;
    collect = 1;
    wait (n_collected >= 512 * 1024);
    collect = 0;
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; n = 4096.0;
    for (int a = 0; a < 4096; a++) begin
      real x, y;
      x = real'(model[a]); y = real'(hist[a]);
      sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y;
    end
    r = (n * sxy - sx * sy) / ($sqrt(n * sxx - sx * sx) * $sqrt(n * syy - sy * sy));
    $display("%s: output histogram of %0d spikes, correlation with the matrix %f, at %0t", tag, n_collected, r, $time);
    chk(r > 0.9, $sformatf("%s: histogram follows the matrix", tag));
  endtask

  initial begin
    #3000ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mops_pub [5] = '{20.5, 23.1, 24.0, 24.4, 24.6};
    int pos_edge_a, pos_edge_b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (!st_clearing);
    repeat (2) @(posedge clk);
    foreach (model[a]) model[a] = 0;

    // 1. time per spike against kernel size
    foreach (kern[a]) kern[a] = 0;
    for (int s = 0; s < 5; s++) begin
      int n, t0, cyc;
      n = 3 + 2 * s;
      load_kernel(n);
      idle();
      t0 = $time;
      for (int k = 0; k < 30; k++) spike(32, 32);
      idle();
      cyc = (($time - t0) / 20 - 4) / 30;
      $display("kernel %0dx%0d: %0d cycles per spike, %f MOPS at 50 MHz (published, with handshake: %f)",
               n, n, cyc, 50.0 * n * n / real'(cyc), mops_pub[s]);
      chk(cyc == 2 * n * n + 1, $sformatf("%0dx%0d kernel costs %0d cycles per spike", n, n, cyc));
    end

    // 2. edge detection on a bitmap and its negative
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int d2;
        d2 = (i - 32) * (i - 32) + (j - 32) * (j - 32);
        img[i][j] = (d2 > 18 * 18 && d2 < 26 * 26) ? 3 : ((j >= 28 && j < 36 && i >= 10 && i < 54) ? 2 : 0);
      end
    foreach (kern[a]) kern[a] = 0;
    for (int r = 0; r < 3; r++) begin kern[r * 11] = -10; kern[r * 11 + 2] = 10; end
    load_kernel(3);
    send_image(0);
    idle();
    compare("bitmap");
    pos_edge_a = model[32 * 64 + 36];   // right of the stem: rising response
    histogram_vs_matrix("bitmap");
    flush();
    compare("after flush");
    send_image(1);
    idle();
    compare("negative bitmap");
    pos_edge_b = model[32 * 64 + 27];   // left of the stem: rising in the negative
    chk(pos_edge_a > 0 && model[32 * 64 + 36] == 0 && pos_edge_b > 0,
        "bitmap and negative give opposite edge responses");
    histogram_vs_matrix("negative bitmap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
