// rng_lfsr: linear-feedback shift register of the random number generator,
// perturbed by sampled ring-oscillator entropy.
//
// A 16-bit Fibonacci LFSR with the maximal-length polynomial
// x^16 + x^14 + x^13 + x^11 + 1 steps twice per clock and emits the two new
// bits as `raw_bits` (bit 1 is the older). The synchronized entropy bit is
// XORed into the feedback of the first step, so the free-running ring
// oscillator keeps reseeding the sequence. If the register ever reaches
// the all-zero lock-up state it is reloaded with SEED. The document names
// the LFSR and its ring-oscillator seeding; width, polynomial and the two
// bits per clock are this design's choice.
//
// Timing: a new pair of raw bits every clock while `enable` is high.
module rng_lfsr #(
  parameter logic [15:0] SEED = 16'hace1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       entropy,
  output logic [1:0] raw_bits,
  output logic [15:0] state
);

  function automatic logic fb(logic [15:0] s);
    return s[15] ^ s[13] ^ s[12] ^ s[10];
  endfunction

  logic [15:0] s1, s2;

  always_comb begin
    s1 = {state[14:0], fb(state) ^ entropy};
    s2 = {s1[14:0], fb(s1)};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= SEED;
    end else if (enable) begin
      state <= (s2 == 16'h0) ? SEED : s2;
    end
  end

  assign raw_bits = state[1:0];

endmodule
