// key_strength: Hamming-weight key strength checker.
//
// Counts the ones of a key byte and grades it:
//   2 (KS_BALANCED)  3..5 ones, bit density 37.5%..62.5%, inside the
//                    35%..65% balanced-key window the document uses
//   1 (KS_MARGINAL)  2 or 6 ones
//   0 (KS_WEAK)      0, 1, 7 or 8 ones
// `balanced` is high for grade 2. The 35%-65% window is the document's;
// the three-level grading is this design's choice (a balanced key reads
// 2, as the key strength signal does for key 0x36 in the simulation).
// Purely combinational.
module key_strength #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] key,
  output logic [1:0]       strength,
  output logic             balanced,
  output logic [$clog2(WIDTH+1)-1:0] weight
);

  always_comb begin
    weight = '0;
    for (int i = 0; i < WIDTH; i++) weight += key[i];
    // density window 35%..65%, in integer form: 20*w in [7*WIDTH, 13*WIDTH]
    balanced = (20 * int'(weight) >= 7 * WIDTH) && (20 * int'(weight) <= 13 * WIDTH);
    if (balanced)
      strength = 2'd2;
    else if (20 * int'(weight) >= 4 * WIDTH && 20 * int'(weight) <= 16 * WIDTH)
      strength = 2'd1;
    else
      strength = 2'd0;
  end

endmodule
