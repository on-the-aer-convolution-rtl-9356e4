// tb_aer_tx: feeds 200 random events to the emitter while a receiver model
// acknowledges after random delays. Checks the addresses received, that the
// address never changes while REQ is high, that REQ does not rise while ACK
// is still high, and the 2*SYNC+4 cycle cost of an event with an immediate
// receiver.
module tb_aer_tx;
  logic clk = 0, rst_n = 0;
  logic ev_valid = 0, ev_ready, aer_req, aer_ack = 0;
  logic [11:0] ev_addr = '0, aer_data;
  int checks = 0, failures = 0;
  logic [11:0] exp_q [$];
  int got = 0;
  bit fast = 1;
  always #5 clk = ~clk;

  aer_tx #(.W(12), .SYNC(2)) dut (.clk, .rst_n, .ev_valid, .ev_addr, .ev_ready, .aer_req, .aer_data, .aer_ack);

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

  // receiver model
  initial forever begin
    @(posedge aer_req);
    chk(!aer_ack, "REQ rises only with ACK low");
    chk(exp_q.size() > 0 && aer_data == exp_q[0], $sformatf("event %0d address", got));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    got++;
    if (!fast) #($urandom_range(1, 60));
    aer_ack = 1;
    @(negedge aer_req);
    if (!fast) #($urandom_range(1, 60));
    aer_ack = 0;
  end
  logic [11:0] last_data;
  always @(posedge clk) begin
    if (aer_req) chk(aer_data == last_data, "address stable while REQ high");
    last_data <= aer_data;
  end

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // timing with an immediate receiver
    @(negedge clk);
    ev_addr = 12'h123; ev_valid = 1; exp_q.push_back(12'h123);
    @(negedge clk);
    ev_valid = 0;
    t = 1;
    while (!ev_ready) begin @(negedge clk); t++; end
    chk(t == 8, $sformatf("event cost %0d cycles, want 8", t));
    fast = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      while (!ev_ready) @(negedge clk);
      ev_addr = 12'($urandom); ev_valid = 1; exp_q.push_back(ev_addr);
      @(negedge clk);
      ev_valid = 0;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    while (!ev_ready || aer_ack) @(negedge clk);
    chk(got == 201, $sformatf("%0d events received, want 201", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
