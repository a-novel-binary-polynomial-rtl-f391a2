// mterm_recon: reconstruction side of one M-term Karatsuba-like step.
//
// From the K sub-products pp[k] (each 2S-1 bits) it forms the 2M-1 result
// coefficients R_c = XOR of the pp[k] listed in kara_pkg::recon_set(M, c),
// and overlaps them: R_c is XORed into the result at bit offset c*S. The
// result is the product of the two M*S bit padded operands.
//
// Interface: pp in, r (2*M*S-1 bits) out. Timing: combinational, an XOR tree
// per coefficient followed by the overlap XOR of neighbouring coefficients.
module mterm_recon
  import kara_pkg::*;
#(
  parameter  int unsigned S = 78,
  parameter  int unsigned M = 3,
  localparam int unsigned K = num_products(M)
) (
  input  logic [K-1:0][2*S-2:0] pp,
  output logic [2*M*S-2:0]      r
);

  localparam rset_tab_t RSET = recon_table(M);

  logic [2*M-2:0][2*S-2:0] coef;

  always_comb begin
    for (int unsigned c = 0; c < 2 * M - 1; c++) begin
      coef[c] = '0;
      for (int unsigned k = 0; k < K; k++)
        if (RSET[c][k]) coef[c] = coef[c] ^ pp[k];
    end
  end

  always_comb begin
    r = '0;
    for (int unsigned c = 0; c < 2 * M - 1; c++)
      r[c*S +: 2*S-1] = r[c*S +: 2*S-1] ^ coef[c];
  end

endmodule
