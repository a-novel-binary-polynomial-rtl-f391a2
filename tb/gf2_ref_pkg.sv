// gf2_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: carry-less (GF(2) polynomial) product by
// shift-and-XOR, reduction by long division, and random wide operands.
// Operands up to 768 bits, products up to 1536 bits.
package gf2_ref_pkg;

  localparam int unsigned W = 768;

  typedef logic [W-1:0]   opnd_t;
  typedef logic [2*W-1:0] prod_t;

  function automatic prod_t clmul(input opnd_t x, input opnd_t y);
    prod_t acc;
    acc = '0;
    for (int i = 0; i < W; i++)
      if (y[i]) acc = acc ^ (prod_t'(x) << i);
    return acc;
  endfunction

  // c mod (x^n + flow), flow of degree < n.
  function automatic opnd_t reduce(input prod_t c, input int n, input opnd_t flow);
    prod_t rem, f;
    f = prod_t'(flow);
    f[n] = 1'b1;
    rem = c;
    for (int i = 2 * W - 1; i >= n; i--)
      if (rem[i]) rem = rem ^ (f << (i - n));
    return opnd_t'(rem);
  endfunction

  // Random n-bit operand; kind selects a corner case:
  // 0 random, 1 all ones, 2 single top bit, 3 single bit 0, 4 zero, 5 sparse.
  function automatic opnd_t rand_opnd(input int n, input int kind);
    opnd_t v;
    v = '0;
    case (kind)
      1: v = '1;
      2: v[n-1] = 1'b1;
      3: v[0] = 1'b1;
      4: v = '0;
      5: begin
        v[$urandom % n] = 1'b1;
        v[$urandom % n] = 1'b1;
      end
      default: for (int w = 0; w < W / 32; w++) v[w*32 +: 32] = $urandom;
    endcase
    for (int i = n; i < W; i++) v[i] = 1'b0;
    return v;
  endfunction

endpackage
