// lfsr: pseudo-random number source.
//
// A 32-bit Fibonacci linear feedback shift register with the maximal-length
// taps 32,22,2,1 (x^32+x^22+x^2+x+1). It advances STEP bits every enabled
// clock so that successive OUT_W-bit samples share no bits when
// STEP >= OUT_W. The register is loaded with SEED at reset; SEED must not be
// zero. Output `rnd` is the low OUT_W bits of the register, registered, so it
// changes one cycle after `en` is high. A shift register of this kind is what
// the mapper's random generator is described as; width, taps and stepping are
// this design's choice.
module lfsr #(
  parameter int unsigned         OUT_W = 8,
  parameter int unsigned         STEP  = 8,
  parameter logic [31:0]         SEED  = 32'h1ACE_B00C
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [OUT_W-1:0] rnd
);

  logic [31:0] state_q, state_d;

  always_comb begin
    state_d = state_q;
    for (int unsigned s = 0; s < STEP; s++) begin
      state_d = {state_d[30:0], state_d[31] ^ state_d[21] ^ state_d[1] ^ state_d[0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state_q <= SEED;
    else if (en) state_q <= state_d;
  end

  assign rnd = state_q[OUT_W-1:0];

  initial assert (SEED != 32'h0) else $error("lfsr: SEED must be non-zero");
  initial assert (OUT_W <= 32) else $error("lfsr: OUT_W above 32");

endmodule
