// chacha_mixer: ChaCha-style mixing stage of the random number generator.
//
// Four 8-bit words a, b, c, d run the ChaCha quarter round, one of its
// four add-rotate-xor lines per clock:
//   step 0: a += b; d ^= a; d <<<= 4
//   step 1: c += d; b ^= c; b <<<= 3
//   step 2: a += b; d ^= a; d <<<= 2
//   step 3: c += d; b ^= c; b <<<= 1   -> key byte a ^ b
// The rotation amounts are ChaCha's 16, 12, 8, 7 scaled to 8-bit words.
// At step 0 the fresh entropy is absorbed: the Von Neumann bits collected
// since the last byte are XORed into d and the LFSR byte into c. The words
// start from the bytes of ChaCha's constant "expa". So one key byte leaves
// every 4 clocks, the rate the document reports; the document names a
// ChaCha-inspired mixing stage but not its insides, which are this
// design's choice.
//
// Timing: `out_valid` pulses once every 4 clocks with `out_byte`.
module chacha_mixer (
  input  logic       clk,
  input  logic       rst,
  input  logic       vn_valid,
  input  logic       vn_bit,
  input  logic [7:0] lfsr_byte,
  output logic [7:0] out_byte,
  output logic       out_valid
);

  function automatic logic [7:0] rotl(logic [7:0] v, int unsigned n);
    return 8'((v << n) | (v >> (8 - n)));
  endfunction

  logic [7:0] a, b, c, d;
  logic [7:0] ent;           // Von Neumann bits gathered since last byte
  logic [1:0] step;

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= 8'h65; b <= 8'h78; c <= 8'h70; d <= 8'h61;
      ent       <= 8'h00;
      step      <= 2'd0;
      out_byte  <= 8'h00;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      step      <= step + 2'd1;
      if (step == 2'd0) ent <= vn_valid ? {7'h00, vn_bit} : 8'h00;
      else if (vn_valid) ent <= {ent[6:0], vn_bit};
      unique case (step)
        2'd0: begin
          a <= a + b;
          d <= rotl((d ^ ent) ^ 8'(a + b), 4);
          c <= c ^ lfsr_byte;
        end
        2'd1: begin
          c <= c + d;
          b <= rotl(b ^ 8'(c + d), 3);
        end
        2'd2: begin
          a <= a + b;
          d <= rotl(d ^ 8'(a + b), 2);
        end
        default: begin
          c         <= c + d;
          b         <= rotl(b ^ 8'(c + d), 1);
          out_byte  <= a ^ rotl(b ^ 8'(c + d), 1);
          out_valid <= 1'b1;
        end
      endcase
    end
  end

endmodule
