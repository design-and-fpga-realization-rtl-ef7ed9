// vn_corrector: Von Neumann corrector removing bias from a bit stream.
//
// Each clock with `in_valid` it looks at one pair of raw bits: 2'b10
// gives an output bit 1, 2'b01 gives 0 (the first bit of the pair), and
// the equal pairs 00 and 11 are discarded. For independent input bits the
// output is unbiased whatever the input bias; on average one pair in two
// yields a bit. This is the standard corrector the document names.
//
// Timing: registered output, `out_valid` with `out_bit` one clock after the
// pair is presented.
module vn_corrector (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [1:0] in_pair,
  output logic       out_bit,
  output logic       out_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (in_pair[1] != in_pair[0]);
      out_bit   <= in_pair[1];
    end
  end

endmodule
