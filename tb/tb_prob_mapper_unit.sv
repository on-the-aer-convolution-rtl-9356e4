// tb_prob_mapper_unit: the whole mapper processor between an AER sender
// model and an AER receiver model that keeps an up/down counter per
// address (positive events count up, negative ones down). The mapping
// table codes the edge kernel K2 = [1 0; 0 -1]: each input pixel (i,j)
// maps to a positive event at (i,j) and a negative one at (i+1,j+1), both
// with R = 1 and P = 1. A small image is sent as spikes, each pixel as many
// times as its grey level, and the counters must equal the convolution
// sum over (a,b) of K2(a,b)*X(i-a, j-b) computed here.
module tb_prob_mapper_unit;
  import aer_conv_pkg::*;
  localparam int SLOTS = 9;
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_ack, out_req, out_ack = 0, sram_oe, st_dropped;
  logic [11:0] in_data = '0;
  logic [12:0] out_data;
  logic [15:0] sram_addr;
  logic [31:0] sram_rdata;
  int checks = 0, failures = 0;
  int counter [4096];
  int img [8][8];
  int n_out = 0, n_neg = 0;
  always #5 clk = ~clk;

  prob_mapper_unit dut (.clk, .rst_n, .in_req, .in_data, .in_ack, .out_req, .out_data, .out_ack,
                        .sram_addr, .sram_oe, .sram_rdata, .st_dropped);
  sram_model #(.AW(16), .ACCESS_NS(12)) u_sram (.addr(sram_addr), .oe(sram_oe), .rdata(sram_rdata));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] ent(bit last, bit sgn, int addr);
    map_entry_t e;
    e = '0;
    e.valid = 1; e.last = last; e.rep = 4'd1; e.prob = 8'd255;
    e.event_ = {sgn, 12'(addr)};
    return 32'(e);
  endfunction

  // receiver with up/down counters
  initial forever begin
    @(posedge out_req);
    #($urandom_range(1, 30));
    if (out_data[12]) begin counter[out_data[11:0]]--; n_neg++; end
    else counter[out_data[11:0]]++;
    n_out++;
    out_ack = 1;
    @(negedge out_req);
    #($urandom_range(1, 30));
    out_ack = 0;
  end

  task automatic send_event(int i, int j);
    in_data = {6'(i), 6'(j)};
    #2 in_req = 1;
    wait (in_ack);
    #2 in_req = 0;
    wait (!in_ack);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int a;
        a = i * 64 + j;
        u_sram.mem[a*SLOTS+0] = ent(0, 0, a);
        // (i+1, j+1) falls outside at the last row/column: one word only
        if (i < 63 && j < 63) u_sram.mem[a*SLOTS+1] = ent(1, 1, (i + 1) * 64 + j + 1);
        else u_sram.mem[a*SLOTS+0] = ent(1, 0, a);
      end
    // an 8x8 test image placed at rows/columns 56..63: a bright square on grey
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) img[i][j] = (i >= 2 && i < 6 && j >= 3 && j < 7) ? 6 : 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    total = 0;
    // interleave the pixels' spikes as a uniform generator would
    for (int round = 0; round < 6; round++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if (img[i][j] > round) begin
            send_event(56 + i, 56 + j);
            total++;
          end
    #2000;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int want;
        want = img[i][j] - ((i > 0 && j > 0) ? img[i-1][j-1] : 0);
        chk(counter[(56 + i) * 64 + 56 + j] == want,
            $sformatf("counter (%0d,%0d) = %0d want %0d", 56 + i, 56 + j, counter[(56 + i) * 64 + 56 + j], want));
      end
    chk(n_neg > 0 && n_out == n_expected(), $sformatf("%0d output events (want %0d), %0d negative", n_out, n_expected(), n_neg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixels in the last image row or column map to one event, the rest to two
  function automatic int n_expected();
    int n;
    n = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        n += img[i][j] * ((i == 7 || j == 7) ? 1 : 2);
    return n;
  endfunction
endmodule
