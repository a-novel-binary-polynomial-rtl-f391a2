// tb_mterm_kara: self-checking test of the recursive multiplier node in
// several organisations, each against a carry-less product worked out here:
//   composite, M=3, L=1 (N=20, padding 20 -> 21)
//   composite, M=5, L=2 (N=37, two levels, padding at both)
//   composite, M=7, L=2 (N=50, 50 -> 8 -> 2-bit leaves)
//   composite, M=2, L=3 (N=64, no padding)
//   pure M-term, M=4 (N=29): M-term levels, then two-term down to 1 bit
//   pure M-term, M=2 (N=13): two-term Karatsuba-Ofman down to 1 bit
module tb_mterm_kara;
  import gf2_ref_pkg::*;

  int unsigned checks = 0, failures = 0;

  localparam int unsigned NC = 6;
  localparam int unsigned CN  [NC] = '{20, 37, 50, 64, 29, 13};
  localparam int unsigned CM  [NC] = '{3, 5, 7, 2, 4, 2};
  localparam int unsigned CL  [NC] = '{1, 2, 2, 3, 2, 4};
  localparam bit          CT2 [NC] = '{0, 0, 0, 0, 1, 1};

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gc = 0; gc < NC; gc++) begin : g_c
    localparam int unsigned N = CN[gc];
    logic [N-1:0]   a, b;
    logic [2*N-2:0] p;

    mterm_kara #(.N(N), .M(CM[gc]), .L(CL[gc]), .TAIL2(CT2[gc])) dut (.a(a), .b(b), .p(p));

    task automatic run();
      prod_t ref_p;
      opnd_t x, y;
      for (int t = 0; t < 400; t++) begin
        x = rand_opnd(N, t % 6);
        y = rand_opnd(N, (t / 6) % 6);
        a = N'(x);
        b = N'(y);
        #1;
        ref_p = clmul(x, y);
        checks++;
        if (p !== ref_p[2*N-2:0]) begin
          failures++;
          if (failures < 10) $display("FAIL config %0d a=%h b=%h", gc, a, b);
        end
      end
    endtask
  end

  initial begin
    g_c[0].run();
    g_c[1].run();
    g_c[2].run();
    g_c[3].run();
    g_c[4].run();
    g_c[5].run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
