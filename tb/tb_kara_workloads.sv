// tb_kara_workloads: the GF(2^n) multiplier at the larger operand sizes for
// which M-term and composite multipliers are compared, n = 282, 409 and 750,
// and at n = 232 with seven terms, each with a different split:
//   u_282 : composite, M = 2, L = 3  (282 -> 141 -> 71 -> 36-bit leaves)
//   u_409 : composite, M = 7, L = 2  (409 -> 59 -> 9-bit leaves)
//   u_750 : composite, M = 5, L = 2  (750 -> 150 -> 30-bit leaves)
//   u_232 : composite, M = 7, L = 1  (232 -> 34-bit leaves)
// Field polynomials are the least irreducible pentanomials of each degree.
// Products and reduced results are compared with a carry-less product and a
// long-division reduction worked out here.
module tb_kara_workloads;
  import gf2_ref_pkg::*;

  int unsigned checks = 0, failures = 0;

  localparam int unsigned NW = 4;
  localparam int unsigned WN [NW] = '{282, 409, 750, 232};
  localparam int unsigned WM [NW] = '{2, 7, 5, 7};
  localparam int unsigned WL [NW] = '{3, 2, 2, 1};
  localparam int unsigned WF0 [NW] = '{6, 7, 14, 9};   // f = x^n + x^WF0 + x^WF1 + x^WF2 + 1
  localparam int unsigned WF1 [NW] = '{3, 5, 13, 4};
  localparam int unsigned WF2 [NW] = '{2, 3, 8, 2};

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gw = 0; gw < NW; gw++) begin : g_w
    localparam int unsigned N = WN[gw];
    localparam logic [N-1:0] FLOW =
      (N'(1) << WF0[gw]) | (N'(1) << WF1[gw]) | (N'(1) << WF2[gw]) | N'(1);
    logic [N-1:0]   a, b, res;
    logic [2*N-2:0] prod;

    kara_mult_top #(.N(N), .M(WM[gw]), .L(WL[gw]), .FLOW(FLOW)) dut (
      .a(a), .b(b), .prod(prod), .res(res));

    task automatic run();
      opnd_t x, y;
      prod_t ref_p;
      for (int t = 0; t < 120; t++) begin
        x = rand_opnd(N, t % 6);
        y = rand_opnd(N, (t / 6) % 6);
        a = N'(x);
        b = N'(y);
        #1;
        ref_p = clmul(x, y);
        checks += 2;
        if (prod !== ref_p[2*N-2:0]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d product", N);
        end
        if (res !== N'(reduce(ref_p, N, opnd_t'(FLOW)))) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d reduced", N);
        end
      end
      $display("n=%0d M=%0d L=%0d done", N, WM[gw], WL[gw]);
    endtask
  end

  initial begin
    g_w[0].run();
    g_w[1].run();
    g_w[2].run();
    g_w[3].run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
