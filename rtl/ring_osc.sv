// ring_osc: behavioural model of a free-running ring oscillator, the
// physical entropy source of the random number generator. Not
// synthesizable logic: on an FPGA the ring is a chain of an odd number of
// LUT inverters closed into a loop, kept by placement constraints.
//
// The model holds STAGES nodes, each the inverse of the one before it, and
// lets the single travelling edge advance one stage per STAGE_DELAY_PS
// plus a random jitter of up to JITTER_PS, so the period is about
// 2 * STAGES * STAGE_DELAY_PS and drifts against the system clock. While
// `enable` is low the ring holds still (the edge waits at its stage). `taps` brings out the nodes chosen
// by TAP_STEP (every TAP_STEP-th stage, starting at stage 0); the document
// says only that the oscillator is tapped at multiple stages, so the stage
// count, tap spacing and delays are this model's choice. The taps are
// asynchronous to any clock and must be synchronized by the user.
// Delays are written in simulator time units, taken to be 1 ps (the
// default when no timescale is given), so a 100 MHz clock is #5000 half
// periods in a testbench.
// Lint may warn that the delay can be zero: that happens only if both
// delay parameters are set to 0. Synthesis reports the nodes as latches,
// because a real ring has no register. Both warnings are expected for a
// simulation model and stand.
module ring_osc #(
  parameter int unsigned STAGES         = 5,
  parameter int unsigned TAP_STEP       = 2,
  parameter int unsigned NTAPS          = (STAGES + TAP_STEP - 1) / TAP_STEP,
  parameter int unsigned STAGE_DELAY_PS = 310,
  parameter int unsigned JITTER_PS      = 60
) (
  input  logic             enable,
  output logic [NTAPS-1:0] taps
);
  logic [STAGES-1:0] node;
  int unsigned       pos;

  initial begin
    // alternating values: stage 0 is the one stage not yet settled
    for (int i = 0; i < STAGES; i++) node[i] = i[0];
    pos = 0;
  end

  // the travelling edge advances one stage per (jittered) stage delay
  always begin
    #(STAGE_DELAY_PS + $urandom_range(JITTER_PS));
    if (enable) begin
      node[pos] = ~node[(pos + STAGES - 1) % STAGES];
      pos = (pos + 1) % STAGES;
    end
  end

  always_comb
    for (int t = 0; t < NTAPS; t++) taps[t] = node[t * TAP_STEP];

endmodule
