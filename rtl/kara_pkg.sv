// kara_pkg: shared types and constant functions of the M-term Karatsuba-like
// binary polynomial multiplier.
//
// An M-term Karatsuba-like step splits each operand into M equal parts
// A_0..A_{M-1}, multiplies K sums of parts with sub-multipliers
//   P_k = (sum_{i in S_k} A_i) * (sum_{i in S_k} B_i)
// and rebuilds the 2M-1 coefficients R_0..R_{2M-2} of the product as XORs of
// the P_k. This package describes a step by two tables:
//   prod_set (m, k) - the index set S_k of product k (bit i set: part i summed)
//   recon_set(m, c) - the products XORed into result coefficient R_c
// The modules that build a step (mterm_preadd, mterm_recon) read only these
// tables, so a formula with fewer products can be swapped in here.
//
// Formulas. For M = 2 and 3 the products are the M squares A_i*B_i
// (k = 0..M-1) followed by the pair products (A_i+A_j)(B_i+B_j), i<j, in
// lexicographic order, and
//   R_c = sum_{i<j, i+j=c} (P_ij + P_i + P_j)  +  P_{c/2} if c is even,
// i.e. the classic two-term (3 products) and three-term (6 products) steps.
// For M = 4..7 the tables tab_prod/tab_recon hold formulas with 9, 13, 17
// and 22 products, the product counts of the best known Karatsuba-like
// formulas. They were found by a search over products of subset sums: a set
// of subsets works when every R_c = sum_{i+j=c} A_i B_j is a GF(2) linear
// combination of the chosen products; tab_recon lists that combination. All
// of them contain the two end squares A_0B_0 and A_{M-1}B_{M-1}, so R_0 and
// R_{2M-2} are single products.
package kara_pkg;

  // Multiplier organisation selected in the top.
  //   KMODE_COMPOSITE: L levels of M-term steps, then schoolbook leaves.
  //   KMODE_MTERM    : M-term steps while the operand is longer than M bits,
  //                    then two-term Karatsuba steps down to single bits.
  typedef enum logic [0:0] {
    KMODE_COMPOSITE = 1'b0,
    KMODE_MTERM     = 1'b1
  } kara_mode_e;

  localparam int unsigned MAX_M = 7;
  localparam int unsigned MAX_K = 22;

  function automatic int unsigned cdiv(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Number of sub-products of one M-term step.
  function automatic int unsigned num_products(input int unsigned m);
    case (m)
      1:       return 1;
      2:       return 3;
      3:       return 6;
      4:       return 9;
      5:       return 13;
      6:       return 17;
      7:       return 22;
      default: return 0;
    endcase
  endfunction

  // Parts summed into product i of the M = 4..7 formulas (bit j: part j).
  function automatic logic [MAX_M-1:0] tab_prod(input int unsigned m, input int unsigned i);
    case (m)
      4: case (i)
            0: return 7'h1;
            1: return 7'h4;
            2: return 7'h8;
            3: return 7'h6;
            4: return 7'hc;
            5: return 7'hb;
            6: return 7'hd;
            7: return 7'he;
            8: return 7'hf;
           default: return '0;
         endcase
      5: case (i)
            0: return 7'h1;
            1: return 7'h2;
            2: return 7'h8;
            3: return 7'h10;
            4: return 7'h3;
            5: return 7'h6;
            6: return 7'h12;
            7: return 7'h18;
            8: return 7'h7;
            9: return 7'hd;
           10: return 7'h16;
           11: return 7'h1b;
           12: return 7'h1f;
           default: return '0;
         endcase
      6: case (i)
            0: return 7'h1;
            1: return 7'h2;
            2: return 7'h8;
            3: return 7'h20;
            4: return 7'h3;
            5: return 7'h6;
            6: return 7'h7;
            7: return 7'h15;
            8: return 7'h16;
            9: return 7'h19;
           10: return 7'h26;
           11: return 7'h2a;
           12: return 7'h32;
           13: return 7'h1b;
           14: return 7'h36;
           15: return 7'h3a;
           16: return 7'h3f;
           default: return '0;
         endcase
      7: case (i)
            0: return 7'h1;
            1: return 7'h2;
            2: return 7'h20;
            3: return 7'h40;
            4: return 7'h3;
            5: return 7'h30;
            6: return 7'h60;
            7: return 7'he;
            8: return 7'h19;
            9: return 7'h2a;
           10: return 7'h31;
           11: return 7'h70;
           12: return 7'h36;
           13: return 7'h39;
           14: return 7'h4b;
           15: return 7'h55;
           16: return 7'h65;
           17: return 7'h66;
           18: return 7'h37;
           19: return 7'h5b;
           20: return 7'h6d;
           21: return 7'h7f;
           default: return '0;
         endcase
      default: return '0;
    endcase
  endfunction

  // Products XORed into R_i of the M = 4..7 formulas (bit k: product k).
  function automatic logic [MAX_K-1:0] tab_recon(input int unsigned m, input int unsigned i);
    case (m)
      4: case (i)
            0: return 22'h1;
            1: return 22'h1d0;
            2: return 22'h13e;
            3: return 22'h165;
            4: return 22'h98;
            5: return 22'h16;
            6: return 22'h4;
           default: return '0;
         endcase
      5: case (i)
            0: return 22'h1;
            1: return 22'h13;
            2: return 22'h130;
            3: return 22'h1e67;
            4: return 22'h169f;
            5: return 22'h1d38;
            6: return 22'h466;
            7: return 22'h8c;
            8: return 22'h8;
           default: return '0;
         endcase
      6: case (i)
            0: return 22'h1;
            1: return 22'h13;
            2: return 22'h70;
            3: return 22'hced4;
            4: return 22'h23c2;
            5: return 22'h11f45;
            6: return 22'h540e;
            7: return 22'h9c22;
            8: return 22'h7f35;
            9: return 22'h4520;
           10: return 22'h8;
           default: return '0;
         endcase
      7: case (i)
            0: return 22'h1;
            1: return 22'h13;
            2: return 22'h41431;
            3: return 22'h1fa0c0;
            4: return 22'h16528d;
            5: return 22'h1bf8b;
            6: return 22'h3f7723;
            7: return 22'h264afe;
            8: return 22'h2dbbf6;
            9: return 22'h18d7ea;
           10: return 22'h860;
           11: return 22'h4c;
           12: return 22'h8;
           default: return '0;
         endcase
      default: return '0;
    endcase
  endfunction


  // Product index of the pair (i, j), i < j, in the M = 2, 3 formulas.
  function automatic int unsigned pair_index(input int unsigned m, input int unsigned i,
                                             input int unsigned j);
    int unsigned k;
    k = m;
    for (int unsigned x = 0; x < m; x++)
      for (int unsigned y = x + 1; y < m; y++) begin
        if (x == i && y == j) return k;
        k++;
      end
    return 0;
  endfunction

  // Parts summed into the operands of product k.
  function automatic logic [MAX_M-1:0] prod_set(input int unsigned m, input int unsigned k);
    logic [MAX_M-1:0] s;
    int unsigned      n;
    s = '0;
    if (m >= 4) begin
      s = tab_prod(m, k);
    end else if (k < m) begin
      s[k] = 1'b1;
    end else begin
      n = m;
      for (int unsigned i = 0; i < m; i++)
        for (int unsigned j = i + 1; j < m; j++) begin
          if (n == k) begin
            s[i] = 1'b1;
            s[j] = 1'b1;
          end
          n++;
        end
    end
    return s;
  endfunction

  // Products XORed into result coefficient R_c, c = 0..2m-2.
  function automatic logic [MAX_K-1:0] recon_set(input int unsigned m, input int unsigned c);
    logic [MAX_K-1:0] r;
    r = '0;
    if (m >= 4) return tab_recon(m, c);
    if (c % 2 == 0 && c / 2 < m) r[c/2] = ~r[c/2];
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = i + 1; j < m; j++)
        if (i + j == c) begin
          r[pair_index(m, i, j)] = ~r[pair_index(m, i, j)];
          r[i] = ~r[i];
          r[j] = ~r[j];
        end
    return r;
  endfunction

  typedef logic [MAX_K-1:0][MAX_M-1:0]   pset_tab_t;   // [k]  -> parts of product k
  typedef logic [2*MAX_M-2:0][MAX_K-1:0] rset_tab_t;   // [c]  -> products of R_c

  // Whole tables, evaluated once at elaboration into localparams.
  function automatic pset_tab_t prod_table(input int unsigned m);
    pset_tab_t t;
    t = '0;
    for (int unsigned k = 0; k < num_products(m); k++) t[k] = prod_set(m, k);
    return t;
  endfunction

  function automatic rset_tab_t recon_table(input int unsigned m);
    rset_tab_t t;
    t = '0;
    for (int unsigned c = 0; c < 2 * m - 1; c++) t[c] = recon_set(m, c);
    return t;
  endfunction

  // Number of M-term levels of the pure M-term multiplier: split while the
  // operand is longer than M bits; the rest is done with two-term steps.
  function automatic int unsigned pure_levels(input int unsigned n, input int unsigned m);
    int unsigned len, lev;
    len = n;
    lev = 0;
    while (len > m) begin
      len = cdiv(len, m);
      lev++;
    end
    return lev;
  endfunction

  // Number of two-term levels that bring an n-bit operand down to one bit.
  function automatic int unsigned two_term_levels(input int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
