// gf_arith: modular arithmetic unit of the ECC engine, GF(P) with P = 251.
//
// One combinational operation per clock of the engine:
//   GF_ADD  y = a + b mod P
//   GF_SUB  y = a - b mod P
//   GF_MUL  y = a * b * R^-1 mod P   (Montgomery product, R = 2^8)
//   GF_MOV  y = a
//   GF_INV  y = a^-1 in Montgomery form, from a 256-entry table that a
//           constant function fills at elaboration (Fermat: v^(P-2) * R^2)
// Montgomery reduction (the reduction scheme the architecture names) keeps
// the product free of division: with T = a*b, m = (T mod R) * P' mod R and
// t = (T + m*P) / R, the result is t or t - P, where P' = -P^-1 mod R.
// Operands must already be reduced (below P); the result then is too.
// Operands in Montgomery form (x*R mod P) stay in that form under all four
// operations.
module gf_arith
  import crypto_pkg::*;
(
  input  gf_op_e     op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] y
);

  logic [8:0]  sum;
  logic [7:0]  sum_red;
  logic [8:0]  diff;
  logic [15:0] prod;
  logic [7:0]  m;
  logic [15:0] mp;
  logic [16:0] t_full;   // low byte is zero by construction
  logic [8:0]  t;
  logic [7:0]  t_red;

  localparam gf_table_t INV_TABLE = gf_inv_build();

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b};
    sum_red = 8'(sum - {1'b0, ECC_P});
    diff    = {1'b0, a} - {1'b0, b};

    prod    = a * b;
    m       = 8'(prod[7:0] * ECC_PPRIME);
    mp      = m * ECC_P;
    t_full  = {1'b0, prod} + {1'b0, mp};
    t       = t_full[16:8];
    t_red   = 8'(t - {1'b0, ECC_P});

    unique case (op)
      GF_ADD:  y = (sum >= {1'b0, ECC_P}) ? sum_red : sum[7:0];
      GF_SUB:  y = diff[8] ? 8'(diff[7:0] + ECC_P) : diff[7:0];
      GF_MUL:  y = (t >= {1'b0, ECC_P}) ? t_red : t[7:0];
      GF_INV:  y = INV_TABLE[a];
      default: y = a;
    endcase
  end

endmodule
