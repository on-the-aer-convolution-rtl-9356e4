// tb_aer_rx: a four-phase AER sender model pushes 200 random addresses
// while the consumer's ready toggles at random. Checks every address
// arrives once and in order, that ACK never rises before the event is
// taken, that the handshake order holds and that ev_valid rises SYNC+1
// cycles after REQ when the receiver is idle.
module tb_aer_rx;
  logic clk = 0, rst_n = 0;
  logic aer_req = 0, aer_ack;
  logic [11:0] aer_data = '0, ev_addr;
  logic ev_valid, ev_ready = 0;
  int checks = 0, failures = 0;
  logic [11:0] sent [$];
  int taken = 0;
  always #5 clk = ~clk;

  aer_rx #(.W(12), .SYNC(2)) dut (.clk, .rst_n, .aer_req, .aer_data, .aer_ack, .ev_valid, .ev_addr, .ev_ready);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  always @(negedge clk) ev_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && ev_valid && ev_ready) begin
    chk(sent.size() > 0 && ev_addr == sent[0], $sformatf("event %0d address", taken));
    chk(!aer_ack, "ACK low while event is offered");
    if (sent.size() > 0) void'(sent.pop_front());
    taken++;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first event: measure latency with ready forced high
    force ev_ready = 1'b1;
    @(negedge clk);
    aer_data = 12'hABC; sent.push_back(12'hABC);
    #1 aer_req = 1;
    t0 = 0;
    while (!ev_valid) begin @(posedge clk); #1; t0++; end
    chk(t0 == 3, $sformatf("ev_valid %0d cycles after REQ (want 3)", t0));
    wait (aer_ack);
    #2 aer_req = 0;
    wait (!aer_ack);
    release ev_ready;
    for (int n = 0; n < 200; n++) begin
      logic [11:0] a;
      a = 12'($urandom);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      aer_data = a; sent.push_back(a);
      #3 aer_req = 1;
      wait (aer_ack);
      chk(ev_addr == a, "captured address stable under ACK");
      #($urandom_range(1, 40)) aer_req = 0;
      wait (!aer_ack);
    end
    repeat (5) @(posedge clk);
    chk(taken == 201, $sformatf("%0d events taken, want 201", taken));
    chk(sent.size() == 0, "no event left over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
