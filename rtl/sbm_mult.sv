// sbm_mult: schoolbook (SBM) binary polynomial multiplier, combinational.
//
// Bit i of each operand is the coefficient of x^i. Every pair of operand bits
// is ANDed (N^2 AND gates) and the partial products of equal weight i+j are
// XORed into coefficient i+j of the 2N-1 bit product ((N-1)^2 XOR gates).
// Over GF(2) there are no carries, so the product is the carry-less product.
// This is the single-step multiplier used at the leaves of the composite
// multiplier; the gate counts are the ones the schoolbook method implies.
//
// Interface: a, b (N bits) in, p (2N-1 bits) out. Timing: purely
// combinational, one AND plus a balanced XOR tree of at most N inputs after
// synthesis.
module sbm_mult #(
  parameter int unsigned N = 26
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);

  always_comb begin
    p = '0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++)
        p[i+j] = p[i+j] ^ (a[i] & b[j]);
  end

endmodule
