// tb_spi_slave: sends 50 random 32-bit frames in SPI mode 0 (MSB first)
// with a slow SCLK, plus one frame cut short by CS_n, and checks every
// complete frame is delivered once with the right bits and the cut one is
// dropped.
module tb_spi_slave;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, mosi = 0;
  logic frame_valid;
  logic [31:0] frame;
  int checks = 0, failures = 0;
  logic [31:0] exp_q [$];
  int got = 0;
  always #5 clk = ~clk;

  spi_slave dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .frame_valid, .frame);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic spi_send(logic [31:0] w, int nbits);
    cs_n = 0;
    #50;
    for (int b = 31; b > 31 - nbits; b--) begin
      mosi = w[b];
      #40 sclk = 1;
      #40 sclk = 0;
    end
    #50 cs_n = 1;
    #100;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && frame_valid) begin
    chk(exp_q.size() > 0 && frame == exp_q[0], $sformatf("frame %0d = %h", got, frame));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    got++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #100;
    spi_send(32'hDEAD_BEEF, 20);            // cut short: must be dropped
    for (int n = 0; n < 50; n++) begin
      logic [31:0] w;
      w = $urandom;
      exp_q.push_back(w);
      spi_send(w, 32);
    end
    #200;
    chk(got == 50, $sformatf("%0d frames, want 50", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
