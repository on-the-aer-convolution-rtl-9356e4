// tb_conv_engine: the engine talks to a kernel RAM model and an updater
// model that is busy for one cycle after every request. For kernel sizes
// 1, 3, 5 and 11 and events in the middle, on the edges and in the corners
// of the image, the list of requests (cell address, weight, skip flag) is
// compared with one built directly from Y(i+a, j+b) += K(a,b). The
// event-to-event time is checked against 2*N*N + 1 cycles; a second pass
// adds random updater stalls and kernel-port conflicts and checks the
// requests are still right.
module tb_conv_engine;
  import aer_conv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] ksize = 4'd3;
  logic ev_valid = 0, ev_ready;
  logic [11:0] ev_addr = '0;
  logic k_en, k_gnt;
  logic [6:0] k_addr;
  logic signed [7:0] k_rdata;
  logic u_valid, u_ready, u_skip;
  logic [11:0] u_addr;
  logic signed [8:0] u_delta;
  int checks = 0, failures = 0;
  logic signed [7:0] kmem [121];
  bit stress = 0;
  logic upd_busy = 0;
  logic hold = 0, nogrant = 0;
  typedef struct { int addr; int delta; bit skip; } req_t;
  req_t got [$];
  always #5 clk = ~clk;

  conv_engine dut (.clk, .rst_n, .ksize, .ev_valid, .ev_addr, .ev_ready,
                   .k_en, .k_addr, .k_gnt, .k_rdata,
                   .u_valid, .u_ready, .u_addr, .u_delta, .u_skip);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // kernel RAM model (synchronous read, port lost when not granted)
  assign k_gnt = !nogrant;
  always @(posedge clk) if (k_en && k_gnt) k_rdata <= kmem[k_addr];
  // updater model
  assign u_ready = !upd_busy && !hold;
  always @(posedge clk) begin
    upd_busy <= u_valid && u_ready;
    if (u_valid && u_ready) got.push_back('{int'(u_addr), int'(u_delta), u_skip});
    if (stress) begin
      hold    <= ($urandom_range(0, 4) == 0);
      nogrant <= ($urandom_range(0, 4) == 0);
    end else begin
      hold <= 0; nogrant <= 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_event(int i, int j, int n);
    int t, h;
    req_t e;
    got.delete();
    @(negedge clk);
    ksize = 4'(n);
    ev_addr = {6'(i), 6'(j)}; ev_valid = 1;
    @(negedge clk);
    ev_valid = 0;
    t = 1;
    while (!ev_ready) begin @(negedge clk); t++; end
    if (!stress) chk(t == 2 * n * n + 1, $sformatf("N=%0d event took %0d cycles, want %0d", n, t, 2 * n * n + 1));
    @(negedge clk);
    chk(got.size() == n * n, $sformatf("N=%0d: %0d requests", n, got.size()));
    h = n / 2;
    for (int a = -h; a <= h; a++)
      for (int b = -h; b <= h; b++) begin
        int y, x;
        y = i + a; x = j + b;
        if (got.size() == 0) break;
        e = got.pop_front();
        chk(e.delta == int'(kmem[(a + h) * 11 + (b + h)]), $sformatf("(%0d,%0d) K(%0d,%0d) weight", i, j, a, b));
        if (y < 0 || y > 63 || x < 0 || x > 63)
          chk(e.skip, $sformatf("(%0d,%0d)+(%0d,%0d) outside is skipped", i, j, a, b));
        else
          chk(!e.skip && e.addr == y * 64 + x, $sformatf("(%0d,%0d)+(%0d,%0d) address", i, j, a, b));
      end
  endtask

  initial begin
    int sizes [4] = '{1, 3, 5, 11};
    for (int a = 0; a < 121; a++) kmem[a] = 8'($urandom_range(0, 254) - 127);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      stress = (p == 1);
      foreach (sizes[s]) begin
        run_event(30, 17, sizes[s]);
        run_event(0, 0, sizes[s]);
        run_event(63, 63, sizes[s]);
        run_event(2, 62, sizes[s]);
        run_event($urandom_range(0, 63), $urandom_range(0, 63), sizes[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
