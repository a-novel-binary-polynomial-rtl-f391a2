// tb_kara_mult_full: the GF(2^232) multiplier with every parameter at its
// default (composite, M = 3, L = 2, f = x^232+x^9+x^4+x^2+1), taken through
// complete multiplications on random and corner operands. Each result, both
// the 463-bit product and the reduced 232-bit one, is compared with a
// carry-less product and a long-division reduction worked out here.
module tb_kara_mult_full;
  import gf2_ref_pkg::*;

  localparam int unsigned N = 232;
  localparam opnd_t FLOW = opnd_t'((1 << 9) | (1 << 4) | (1 << 2) | 1);

  int unsigned checks = 0, failures = 0;

  logic [N-1:0]   a, b, res;
  logic [2*N-2:0] prod;

  kara_mult_top dut (.a(a), .b(b), .prod(prod), .res(res));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opnd_t x, y;
    prod_t ref_p;
    for (int t = 0; t < 500; t++) begin
      x = rand_opnd(N, t % 6);
      y = rand_opnd(N, (t / 6) % 6);
      a = N'(x);
      b = N'(y);
      #1;
      ref_p = clmul(x, y);
      checks += 2;
      if (prod !== ref_p[2*N-2:0]) begin
        failures++;
        if (failures < 10) $display("FAIL product a=%h b=%h", a, b);
      end
      if (res !== N'(reduce(ref_p, N, FLOW))) begin
        failures++;
        if (failures < 10) $display("FAIL reduced a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
