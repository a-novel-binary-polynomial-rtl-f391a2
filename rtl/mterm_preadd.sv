// mterm_preadd: operand side of one M-term Karatsuba-like step.
//
// The zero-padded operand x (M*S bits) is cut into M parts of S bits,
// part i = x[i*S +: S] being the coefficient of y^i with y = x^S. For every
// sub-product k the part sums of kara_pkg::prod_set(M, k) are XORed into
// y[k], the operand of sub-multiplier k. One instance serves each operand.
// The formula tables are constants, so the block is a fixed XOR network.
//
// Interface: x in, y (K = kara_pkg::num_products(M) words of S bits) out.
// Timing: combinational, one XOR tree per word; with the formulas of
// kara_pkg a word sums up to M parts (two for M = 2, 3).
module mterm_preadd
  import kara_pkg::*;
#(
  parameter  int unsigned S = 78,
  parameter  int unsigned M = 3,
  localparam int unsigned K = num_products(M)
) (
  input  logic [M*S-1:0]        x,
  output logic [K-1:0][S-1:0]   y
);

  localparam pset_tab_t PSET = prod_table(M);

  always_comb begin
    for (int unsigned k = 0; k < K; k++) begin
      y[k] = '0;
      for (int unsigned i = 0; i < M; i++)
        if (PSET[k][i]) y[k] = y[k] ^ x[i*S +: S];
    end
  end

endmodule
