// hybrid_rng: hardware random number generator that supplies session keys.
//
// Chain: ring-oscillator taps (asynchronous) -> two-flop synchronizers ->
// XOR of the taps as one entropy bit per clock -> rng_lfsr, which folds
// the entropy into its feedback and emits two raw bits per clock ->
// vn_corrector (Von Neumann de-biasing) -> chacha_mixer, which also takes
// the low LFSR byte and emits one key byte every 4 clocks -> key_fifo.
// The generator runs continuously after reset, independent of the cipher
// engines; a consumer takes bytes from the FIFO head with `pop`. The block
// list (oscillator, LFSR, Von Neumann corrector, mixing stage, FIFO) and
// the byte rate are the document's; the way they are joined is this
// design's choice.
//
// Interface: key_out/key_avail show the FIFO head (first-word
// fall-through); `pop` removes it. byte_valid pulses when the mixer
// produces a byte; overflow pulses when a byte is dropped because the FIFO
// is full.
module hybrid_rng #(
  parameter int unsigned NTAPS      = 3,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NTAPS-1:0] ro_taps,
  input  logic             pop,
  output logic [7:0]       key_out,
  output logic             key_avail,
  output logic             byte_valid,
  output logic             overflow
);

  logic [NTAPS-1:0] sync1, sync2;
  logic             entropy;
  logic [1:0]       raw_bits;
  logic [15:0]      lfsr_state;
  logic             vn_bit, vn_valid;
  logic [7:0]       mix_byte;
  logic             fifo_empty, fifo_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= ro_taps;
      sync2 <= sync1;
    end
  end

  assign entropy = ^sync2;

  rng_lfsr u_lfsr (
    .clk, .rst, .enable(1'b1), .entropy,
    .raw_bits, .state(lfsr_state)
  );

  vn_corrector u_vn (
    .clk, .rst, .in_valid(1'b1), .in_pair(raw_bits),
    .out_bit(vn_bit), .out_valid(vn_valid)
  );

  chacha_mixer u_mix (
    .clk, .rst, .vn_valid, .vn_bit, .lfsr_byte(lfsr_state[7:0]),
    .out_byte(mix_byte), .out_valid(byte_valid)
  );

  key_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .push(byte_valid), .din(mix_byte), .pop(pop && !fifo_empty),
    .dout(key_out), .empty(fifo_empty), .full(fifo_full), .overflow
  );

  assign key_avail = !fifo_empty;

endmodule
