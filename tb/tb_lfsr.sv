// tb_lfsr: checks the LFSR against a bit-serial reference of the polynomial
// x^32+x^22+x^2+x+1, that it holds when disabled, and that 8-bit samples
// are spread over the whole range.
module tb_lfsr;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] rnd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lfsr #(.OUT_W(8), .STEP(8), .SEED(32'h1234_5678)) dut (.clk, .rst_n, .en, .rnd);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] ref_step(logic [31:0] s);
    for (int k = 0; k < 8; k++) s = {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    int hist [4];
    model = 32'h1234_5678;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(rnd == model[7:0], "seed after reset");
    // disabled: no change
    repeat (3) @(negedge clk);
    chk(rnd == model[7:0], "hold while disabled");
    en = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      model = ref_step(model);
      chk(rnd == model[7:0], $sformatf("sample %0d", n));
      hist[rnd[7:6]]++;
    end
    en = 0;
    for (int q = 0; q < 4; q++)
      chk(hist[q] > 800 && hist[q] < 1200, $sformatf("quarter %0d holds %0d of 4000 samples", q, hist[q]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
