// mterm_kara: recursive M-term Karatsuba-like binary polynomial multiplier.
//
// One instance is one recurrence stage. While L > 0 it pads both N-bit
// operands with zeros to M*S bits, S = ceil(N/M), forms the K sub-multiplier
// operands (mterm_preadd), multiplies them with K instances of itself at
// S bits and L-1 levels, and rebuilds the product (mterm_recon). The padding
// only adds zero high coefficients, so the low 2N-1 bits of the rebuilt
// product are the result.
// When L reaches 0 the operand is multiplied in one step:
//   TAIL2 = 0: by a schoolbook multiplier (sbm_mult). With L = 1..3 this is
//              the composite multiplier: M-term steps at the upper levels,
//              single-step schoolbook multiplication at the lowest one.
//   TAIL2 = 1: by two-term Karatsuba steps down to single bits, as in the
//              pure M-term multiplier, whose last recurrence stages are
//              two-term to avoid heavy zero padding of short operands.
// A one-bit operand is always a single AND.
//
// Interface: a, b (N bits) in, p (2N-1 bits) out, bit i = coefficient of x^i.
// Timing: purely combinational; the depth grows with the number of stages.
//
// Lint notes. The top bits of p_full above x^(2N-2) are left unread: they
// are products of the zero padding. When this module is linted as the top of
// its own hierarchy, Verilator reports a_sub/b_sub as unused and p_sub as
// undriven in that top instance only: it does not expand the self-instances
// of a recursive module that is the top itself. Inside any parent, as in
// kara_mult_top, the hierarchy is built in full and the warnings vanish.
module mterm_kara
  import kara_pkg::*;
#(
  parameter int unsigned N     = 232,
  parameter int unsigned M     = 3,
  parameter int unsigned L     = 2,
  parameter bit          TAIL2 = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);

  if (N == 1 || (L == 0 && !TAIL2)) begin : g_leaf
    sbm_mult #(.N(N)) u_sbm (.a(a), .b(b), .p(p));

  end else if (L == 0) begin : g_tail
    mterm_kara #(
      .N(N), .M(2), .L(two_term_levels(N)), .TAIL2(1'b0)
    ) u_tail (.a(a), .b(b), .p(p));

  end else begin : g_step
    localparam int unsigned S = cdiv(N, M);
    localparam int unsigned K = num_products(M);

    logic [M*S-1:0]        a_pad, b_pad;
    logic [K-1:0][S-1:0]   a_sub, b_sub;
    logic [K-1:0][2*S-2:0] p_sub;
    logic [2*M*S-2:0]      p_full;

    assign a_pad = (M*S)'(a);
    assign b_pad = (M*S)'(b);

    mterm_preadd #(.S(S), .M(M)) u_pre_a (.x(a_pad), .y(a_sub));
    mterm_preadd #(.S(S), .M(M)) u_pre_b (.x(b_pad), .y(b_sub));

    for (genvar k = 0; k < K; k++) begin : g_sub
      mterm_kara #(
        .N(S), .M(M), .L(L - 1), .TAIL2(TAIL2)
      ) u_sub (.a(a_sub[k]), .b(b_sub[k]), .p(p_sub[k]));
    end

    mterm_recon #(.S(S), .M(M)) u_rec (.pp(p_sub), .r(p_full));

    // Coefficients above x^(2N-2) are products of padding and are zero.
    assign p = p_full[2*N-2:0];
  end

endmodule
