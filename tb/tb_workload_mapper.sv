// tb_workload_mapper: the mapper processor at its default size on the two
// evaluation examples of that design, over a whole 64x64 bitmap. Every one
// of the 4096 input addresses has its projective field in the mapping
// table, clipped at the image border. The bitmap (a bright disc with a
// dimmer bar) is sent as spikes, each pixel as many times as its grey level,
// in interleaved rounds.
//
// 1. Soft edges with K1 = [0.1 0.05; 0.75 0.1], coded as R = 1 and P = K.
//    The histogram of the output traffic must correlate with the
//    convolution of the bitmap with K1 (Pearson r > 0.9), and the total
//    traffic must be within 5 % of its expected value.
// 2. Edge detection with K2 = [1 0; 0 -1]: one positive and one negative
//    event per input event, both with R = 1 and P = 1. A receiver with an
//    up/down counter per address must end with exactly the convolution, and
//    both the positive and the negative traffic must be present.
module tb_workload_mapper;
  import aer_conv_pkg::*;
  localparam int SLOTS = 9;
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_ack, out_req, out_ack = 0, sram_oe, st_dropped;
  logic [11:0] in_data = '0;
  logic [12:0] out_data;
  logic [15:0] sram_addr;
  logic [31:0] sram_rdata;
  int checks = 0, failures = 0;
  int img [64][64];
  int pos [4096], neg [4096];
  int n_out = 0;
  always #5 clk = ~clk;   // 100 MHz

  prob_mapper_unit dut (.clk, .rst_n, .in_req, .in_data, .in_ack, .out_req, .out_data, .out_ack,
                        .sram_addr, .sram_oe, .sram_rdata, .st_dropped);
  sram_model #(.AW(16), .ACCESS_NS(12)) u_sram (.addr(sram_addr), .oe(sram_oe), .rdata(sram_rdata));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // fast AER receiver keeping positive and negative counts per address
  initial forever begin
    @(posedge out_req);
    if (out_data[12]) neg[out_data[11:0]]++;
    else pos[out_data[11:0]]++;
    n_out++;
    #1 out_ack = 1;
    @(negedge out_req);
    #1 out_ack = 0;
  end

  function automatic logic [31:0] ent(bit last, int prob, bit sgn, int addr);
    map_entry_t e;
    e = '0;
    e.valid = 1; e.last = last; e.rep = 4'd1; e.prob = 8'(prob);
    e.event_ = {sgn, 12'(addr)};
    return 32'(e);
  endfunction

  // write the table for a 2x2 kernel given as probability codes and signs;
  // a zero weight (code < 0) gives no entry
  task automatic load_table(int code [4], bit sgn [4]);
    foreach (u_sram.mem[w]) u_sram.mem[w] = '0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int n, base;
        int tgt [4];
        int cs [4];
        bit sg [4];
        n = 0;
        base = (i * 64 + j) * SLOTS;
        for (int k = 0; k < 4; k++)
          if (code[k] >= 0 && i + k / 2 < 64 && j + k % 2 < 64) begin
            tgt[n] = (i + k / 2) * 64 + j + k % 2; cs[n] = code[k]; sg[n] = sgn[k]; n++;
          end
        for (int k = 0; k < n; k++) u_sram.mem[base + k] = ent(k == n - 1, cs[k], sg[k], tgt[k]);
      end
  endtask

  task automatic send_event(int i, int j);
    in_data = {6'(i), 6'(j)};
    #1 in_req = 1;
    wait (in_ack);
    #1 in_req = 0;
    wait (!in_ack);
  endtask

  task automatic send_image(int times);
    foreach (pos[a]) begin pos[a] = 0; neg[a] = 0; end
    n_out = 0;
    for (int t = 0; t < times; t++)
      for (int g = 0; g < 8; g++)
        for (int i = 0; i < 64; i++)
          for (int j = 0; j < 64; j++)
            if (img[i][j] > g) send_event(i, j);
    #2000;
  endtask

  // convolution of the bitmap with a 2x2 kernel, output at the lower right
  function automatic real conv(int i, int j, real kk [4]);
    real s;
    s = 0;
    for (int k = 0; k < 4; k++)
      if (i - k / 2 >= 0 && j - k % 2 >= 0) s += kk[k] * img[i - k / 2][j - k % 2];
    return s;
  endfunction

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k1 [4] = '{0.1, 0.05, 0.75, 0.1};
    real k2 [4] = '{1.0, 0.0, 0.0, -1.0};
    int c1 [4];
    bit s1 [4] = '{0, 0, 0, 0};
    int c2 [4] = '{255, -1, -1, 255};
    bit s2 [4] = '{0, 0, 0, 1};
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int d2;
        d2 = (i - 30) * (i - 30) + (j - 34) * (j - 34);
        img[i][j] = d2 < 20 * 20 ? 7 : ((i >= 54 && i < 60 && j >= 6 && j < 58) ? 4 : 0);
      end
    foreach (c1[k]) c1[k] = int'(256.0 * k1[k]) - 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. soft edges
    begin
      real sx, sy, sxx, syy, sxy, r, n, want_total;
      load_table(c1, s1);
      send_image(3);
      sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; n = 4096.0; want_total = 0;
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) begin
          real x, y;
          x = conv(i, j, k1); y = real'(pos[i * 64 + j]);
          sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y;
        end
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++)
          for (int k = 0; k < 4; k++)
            if (i + k / 2 < 64 && j + k % 2 < 64) want_total += 3.0 * img[i][j] * (c1[k] + 1) / 256.0;
      r = (n * sxy - sx * sy) / ($sqrt(n * sxx - sx * sx) * $sqrt(n * syy - sy * sy));
      $display("K1: %0d output events (expected %0.0f), correlation with conv2 %f", n_out, want_total, r);
      chk(r > 0.9, "K1 histogram follows the convolution");
      chk(real'(n_out) > 0.95 * want_total && real'(n_out) < 1.05 * want_total, "K1 total traffic");
    end

    // 2. edge detection with up/down counters
    begin
      int bad, npos, nneg;
      load_table(c2, s2);
      send_image(1);
      bad = 0; npos = 0; nneg = 0;
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) begin
          if (pos[i * 64 + j] - neg[i * 64 + j] != int'(conv(i, j, k2))) bad++;
          npos += pos[i * 64 + j];
          nneg += neg[i * 64 + j];
        end
      $display("K2: %0d positive and %0d negative events, %0d counters wrong", npos, nneg, bad);
      chk(bad == 0, "K2 up/down counters equal the convolution");
      chk(npos > 0 && nneg > 0, "K2 has positive and negative traffic");
    end
    chk(!st_dropped, "no table overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
