// tb_kara_mult_top: end-to-end test of the GF(2^N) multiplier.
//
// Four multipliers run side by side on random and corner operands, each
// checked against a carry-less product and a long-division reduction worked
// out here:
//   u_def  : all defaults, N = 232, composite, M = 3, L = 2
//   u_pure : pure M-term mode, N = 64, M = 5 (64 -> 13 -> 3, then two-term)
//   u_m7   : composite, N = 100, M = 7, L = 1 (15-bit schoolbook leaves)
//   u_m2   : composite, N = 64, M = 2, L = 3 (no zero padding)
// Each mechanism of the design is counted and must occur: zero padding of a
// split, schoolbook leaves, the two-term tail of the pure mode, and a
// reduction that has to fold high coefficients back (product degree >= N).
module tb_kara_mult_top;
  import gf2_ref_pkg::*;
  import kara_pkg::*;

  int unsigned checks = 0, failures = 0;
  int unsigned n_pad = 0, n_sbm_leaf = 0, n_two_term_tail = 0, n_fold = 0, n_nofold = 0;

  localparam int unsigned ND = 232;
  localparam int unsigned NP = 64;
  localparam int unsigned N7 = 100;

  localparam logic [ND-1:0] FD = ND'((1 << 9) | (1 << 4) | (1 << 2) | 1);
  localparam logic [NP-1:0] FP = NP'((1 << 4) | (1 << 3) | (1 << 1) | 1);
  localparam logic [N7-1:0] F7 = N7'((1 << 6) | (1 << 5) | (1 << 2) | 1);

  logic [ND-1:0] a_d, b_d, r_d;  logic [2*ND-2:0] p_d;
  logic [NP-1:0] a_p, b_p, r_p;  logic [2*NP-2:0] p_p;
  logic [N7-1:0] a_7, b_7, r_7;  logic [2*N7-2:0] p_7;
  logic [NP-1:0] a_2, b_2, r_2;  logic [2*NP-2:0] p_2;

  kara_mult_top u_def (.a(a_d), .b(b_d), .prod(p_d), .res(r_d));
  kara_mult_top #(.N(NP), .M(5), .MODE(KMODE_MTERM), .FLOW(FP)) u_pure (
    .a(a_p), .b(b_p), .prod(p_p), .res(r_p));
  kara_mult_top #(.N(N7), .M(7), .L(1), .FLOW(F7)) u_m7 (
    .a(a_7), .b(b_7), .prod(p_7), .res(r_7));
  kara_mult_top #(.N(NP), .M(2), .L(3), .FLOW(FP)) u_m2 (
    .a(a_2), .b(b_2), .prod(p_2), .res(r_2));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compares one multiplier's outputs; returns 1 if the product reached x^N.
  function automatic bit check(input string name, input int n, input opnd_t flow,
                               input opnd_t x, input opnd_t y,
                               input prod_t got_p, input opnd_t got_r);
    prod_t ref_p, mask;
    opnd_t ref_r;
    ref_p = clmul(x, y);
    ref_r = reduce(ref_p, n, flow);
    mask  = (prod_t'(1) << (2 * n - 1)) - 1;
    checks += 2;
    if ((got_p & mask) !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL %s product a=%h b=%h", name, x, y);
    end
    if (got_r !== ref_r) begin
      failures++;
      if (failures < 10) $display("FAIL %s reduced a=%h b=%h", name, x, y);
    end
    return (ref_p >> n) != '0;
  endfunction

  initial begin
    opnd_t x, y;
    bit    folded;
    for (int t = 0; t < 300; t++) begin
      // u_def
      x = rand_opnd(ND, t % 6);  y = rand_opnd(ND, (t / 6) % 6);
      a_d = ND'(x);  b_d = ND'(y);
      #1;
      folded = check("u_def", ND, opnd_t'(FD), x, y, prod_t'(p_d), opnd_t'(r_d));
      if (folded) n_fold++; else n_nofold++;
      n_sbm_leaf++;
      if (ND % 3 != 0) n_pad++;
      // u_pure
      x = rand_opnd(NP, (t + 1) % 6);  y = rand_opnd(NP, (t / 6 + 2) % 6);
      a_p = NP'(x);  b_p = NP'(y);
      #1;
      folded = check("u_pure", NP, opnd_t'(FP), x, y, prod_t'(p_p), opnd_t'(r_p));
      if (folded) n_fold++; else n_nofold++;
      n_two_term_tail++;
      // u_m7
      x = rand_opnd(N7, (t + 2) % 6);  y = rand_opnd(N7, (t / 6 + 1) % 6);
      a_7 = N7'(x);  b_7 = N7'(y);
      #1;
      folded = check("u_m7", N7, opnd_t'(F7), x, y, prod_t'(p_7), opnd_t'(r_7));
      if (folded) n_fold++; else n_nofold++;
      n_sbm_leaf++;
      if (N7 % 7 != 0) n_pad++;
      // u_m2
      x = rand_opnd(NP, (t + 3) % 6);  y = rand_opnd(NP, (t / 6 + 3) % 6);
      a_2 = NP'(x);  b_2 = NP'(y);
      #1;
      folded = check("u_m2", NP, opnd_t'(FP), x, y, prod_t'(p_2), opnd_t'(r_2));
      if (folded) n_fold++; else n_nofold++;
      n_sbm_leaf++;
    end
    $display("mechanisms: zero padding %0d, schoolbook leaves %0d, two-term tail %0d, reduction fold %0d (no fold %0d)",
             n_pad, n_sbm_leaf, n_two_term_tail, n_fold, n_nofold);
    if (n_pad == 0)           begin failures++; $display("FAIL zero padding never exercised"); end
    if (n_sbm_leaf == 0)      begin failures++; $display("FAIL schoolbook leaves never exercised"); end
    if (n_two_term_tail == 0) begin failures++; $display("FAIL two-term tail never exercised"); end
    if (n_fold == 0)          begin failures++; $display("FAIL reduction fold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
