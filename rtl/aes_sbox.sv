// aes_sbox: Sub Bytes look-up table of the 8-bit AES core.
//
// The 256-entry table is the FIPS-197 S-box (or its inverse when INVERSE
// is set). It is computed once at elaboration from its definition (field
// inverse in GF(2^8) followed by the affine map with constant 0x63), so no
// data file is needed. The read is combinational, which lets a full round
// complete in one clock; on an FPGA it maps to LUT ROM.
//
// Interface: din (8 bits) -> dout (8 bits), no clock, no latency.
module aes_sbox
  import crypto_pkg::*;
#(
  parameter bit INVERSE = 1'b0   // 0: Sub Bytes, 1: Inverse Sub Bytes
) (
  input  logic [7:0] din,
  output logic [7:0] dout
);

  localparam sbox_table_t TABLE = sbox_build(INVERSE);

  assign dout = TABLE[din];

endmodule
