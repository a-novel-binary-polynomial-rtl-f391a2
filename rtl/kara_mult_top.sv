// kara_mult_top: GF(2^N) multiplier built from an M-term Karatsuba-like
// binary polynomial multiplier followed by modular reduction.
//
// The polynomial multiplier is selected by MODE:
//   KMODE_COMPOSITE (default): L levels of M-term Karatsuba-like steps, then
//     single-step schoolbook multipliers. With N = 232, M = 3, L = 2 the
//     operands are padded to 234 bits, split into 3 parts of 78 bits, those
//     into 3 parts of 26 bits, and 36 schoolbook 26x26 multipliers form the
//     leaf products.
//   KMODE_MTERM: M-term steps while the operand is longer than M bits, then
//     two-term Karatsuba steps down to single bits (L is not used).
// The unreduced product is an output of its own, since the multiplier is
// also useful without reduction; gf2m_reduce then reduces it modulo
// f(x) = x^N + FLOW(x).
//
// Interface: a, b (N bits, bit i = coefficient of x^i) in; prod (2N-1 bits)
// and res = a*b mod f (N bits) out. Timing: purely combinational, no clock;
// register the ports outside if a pipelined multiplier is wanted.
module kara_mult_top
  import kara_pkg::*;
#(
  parameter int unsigned  N    = 232,
  parameter int unsigned  M    = 3,
  parameter int unsigned  L    = 2,
  parameter kara_mode_e   MODE = KMODE_COMPOSITE,
  parameter logic [N-1:0] FLOW = N'((1 << 9) | (1 << 4) | (1 << 2) | 1)
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] prod,
  output logic [N-1:0]   res
);

  if (MODE == KMODE_COMPOSITE) begin : g_composite
    mterm_kara #(.N(N), .M(M), .L(L), .TAIL2(1'b0)) u_mul (.a(a), .b(b), .p(prod));
  end else begin : g_mterm
    mterm_kara #(.N(N), .M(M), .L(pure_levels(N, M)), .TAIL2(1'b1)) u_mul (
      .a(a), .b(b), .p(prod)
    );
  end

  gf2m_reduce #(.N(N), .FLOW(FLOW)) u_red (.c(prod), .r(res));

endmodule
