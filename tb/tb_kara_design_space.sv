// tb_kara_design_space: composite configurations at the 232-bit operand
// size, each with the default field polynomial: M = 2..7 terms with L = 1
// and 2 levels, and L = 3 for M = 2..4. Leaf sizes run from 116 bits (M=2,
// L=1) down to 4 bits (M=4, L=3). L = 3 with M = 5..7 (2197 to 10648 leaf
// multipliers of 1-2 bits) is left out to keep the simulation build short;
// the same recursion is exercised by the L = 3 cases that are run. Products and reduced results are compared
// with a carry-less product and a long-division reduction worked out here.
module tb_kara_design_space;
  import gf2_ref_pkg::*;

  localparam int unsigned N = 232;
  localparam opnd_t FLOW = opnd_t'((1 << 9) | (1 << 4) | (1 << 2) | 1);

  int unsigned checks = 0, failures = 0;

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gm = 2; gm <= 7; gm++) begin : g_m
    for (genvar gl = 1; gl <= (gm <= 4 ? 3 : 2); gl++) begin : g_l
      logic [N-1:0]   a, b, res;
      logic [2*N-2:0] prod;

      kara_mult_top #(.N(N), .M(gm), .L(gl)) dut (.a(a), .b(b), .prod(prod), .res(res));

      task automatic run();
        opnd_t x, y;
        prod_t ref_p;
        for (int t = 0; t < 40; t++) begin
          x = rand_opnd(N, t % 6);
          y = rand_opnd(N, (t / 6) % 6);
          a = N'(x);
          b = N'(y);
          #1;
          ref_p = clmul(x, y);
          checks += 2;
          if (prod !== ref_p[2*N-2:0]) begin
            failures++;
            if (failures < 10) $display("FAIL M=%0d L=%0d product", gm, gl);
          end
          if (res !== N'(reduce(ref_p, N, FLOW))) begin
            failures++;
            if (failures < 10) $display("FAIL M=%0d L=%0d reduced", gm, gl);
          end
        end
      endtask
    end
  end

  initial begin
    g_m[2].g_l[1].run(); g_m[2].g_l[2].run(); g_m[2].g_l[3].run();
    g_m[3].g_l[1].run(); g_m[3].g_l[2].run(); g_m[3].g_l[3].run();
    g_m[4].g_l[1].run(); g_m[4].g_l[2].run(); g_m[4].g_l[3].run();
    g_m[5].g_l[1].run(); g_m[5].g_l[2].run();
    g_m[6].g_l[1].run(); g_m[6].g_l[2].run();
    g_m[7].g_l[1].run(); g_m[7].g_l[2].run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
