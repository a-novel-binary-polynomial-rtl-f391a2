// tb_mterm_recon: self-checking test of the reconstruction side of an M-term
// step, for M = 2..7 with S = 6. Random padded operands go through
// mterm_preadd; the sub-products are formed here as carry-less products and
// fed to the reconstruction, whose result must equal the carry-less product
// of the whole operands. The check therefore tests the formula itself.
module tb_mterm_recon;
  import gf2_ref_pkg::*;

  localparam int unsigned S = 6;

  int unsigned checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gm = 2; gm <= 7; gm++) begin : g_m
    localparam int unsigned K = kara_pkg::num_products(gm);
    logic [gm*S-1:0]       xa, xb;
    logic [K-1:0][S-1:0]   ya, yb;
    logic [K-1:0][2*S-2:0] pp;
    logic [2*gm*S-2:0]     r;

    mterm_preadd #(.S(S), .M(gm)) u_pa (.x(xa), .y(ya));
    mterm_preadd #(.S(S), .M(gm)) u_pb (.x(xb), .y(yb));
    mterm_recon  #(.S(S), .M(gm)) dut  (.pp(pp), .r(r));

    task automatic run();
      prod_t full, sub;
      for (int t = 0; t < 300; t++) begin
        xa = (gm*S)'(rand_opnd(gm * S, t % 6));
        xb = (gm*S)'(rand_opnd(gm * S, (t / 6) % 6));
        #1;
        for (int k = 0; k < K; k++) begin
          sub = clmul(opnd_t'(ya[k]), opnd_t'(yb[k]));
          pp[k] = sub[2*S-2:0];
        end
        #1;
        full = clmul(opnd_t'(xa), opnd_t'(xb));
        checks++;
        if (r !== full[2*gm*S-2:0]) begin
          failures++;
          if (failures < 10) $display("FAIL M=%0d a=%h b=%h got %h exp %h", gm, xa, xb, r,
                                      full[2*gm*S-2:0]);
        end
      end
    endtask
  end

  initial begin
    g_m[2].run();
    g_m[3].run();
    g_m[4].run();
    g_m[5].run();
    g_m[6].run();
    g_m[7].run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
