// gf2m_reduce: reduction of a binary polynomial product modulo an
// irreducible polynomial f(x) = x^N + FLOW(x) of degree N, combinational.
//
// The unreduced product c has degree at most 2N-2. Going from the highest
// coefficient down to x^N, every set coefficient x^i is replaced by
// x^(i-N) * FLOW(x), since x^N = FLOW(x) mod f. After the loop the N low bits
// hold c mod f. With a sparse FLOW this unrolls into a fixed XOR network.
// The field polynomial is a parameter; the default, x^232+x^9+x^4+x^2+1, is
// an irreducible pentanomial of degree 232 (degree-232 trinomials are all
// reducible), the least one in lexicographic order of its middle exponents.
//
// Interface: c (2N-1 bits) in, r (N bits) out. Timing: combinational.
module gf2m_reduce #(
  parameter int unsigned  N    = 232,
  parameter logic [N-1:0] FLOW = N'((1 << 9) | (1 << 4) | (1 << 2) | 1)
) (
  input  logic [2*N-2:0] c,
  output logic [N-1:0]   r
);

  logic [2*N-2:0] t;

  always_comb begin
    t = c;
    for (int i = 2 * N - 2; i >= int'(N); i--)
      if (t[i]) begin
        t[i]           = 1'b0;
        t[i-N +: N]    = t[i-N +: N] ^ FLOW;
      end
    r = t[N-1:0];
  end

endmodule
