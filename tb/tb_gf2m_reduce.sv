// tb_gf2m_reduce: self-checking test of the modular reduction.
//
// Instance 1 uses the AES field, f = x^8+x^4+x^3+x+1: the product of every
// pair of bytes, formed here as a carry-less product, is reduced by the DUT
// and compared with a shift-and-add field multiplication that reduces after
// every step (a different algorithm), and with the FIPS-197 example
// {57}*{83} = {c1}. Instance 2 is the default 232-bit field: the DUT result
// must satisfy c = q*f + r, checked by rebuilding c from a quotient found by
// long division here.
module tb_gf2m_reduce;

  int unsigned checks = 0, failures = 0;

  logic [14:0] c8;
  logic [7:0]  r8;
  gf2m_reduce #(.N(8), .FLOW(8'h1B)) dut8 (.c(c8), .r(r8));

  localparam int unsigned NB = 232;
  logic [2*NB-2:0] cb;
  logic [NB-1:0]   rb;
  gf2m_reduce dutb (.c(cb), .r(rb));

  function automatic logic [7:0] aes_mul(input logic [7:0] x, input logic [7:0] y);
    logic [7:0] acc, t;
    acc = '0;
    t = x;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) acc = acc ^ t;
      t = t[7] ? ((t << 1) ^ 8'h1B) : (t << 1);
    end
    return acc;
  endfunction

  function automatic logic [14:0] clmul8(input logic [7:0] x, input logic [7:0] y);
    logic [14:0] acc;
    acc = '0;
    for (int i = 0; i < 8; i++)
      if (y[i]) acc = acc ^ (15'(x) << i);
    return acc;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB:0]     f;
    logic [2*NB-2:0] rem, rebuilt, q_times_f;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        c8 = clmul8(8'(x), 8'(y));
        #1;
        checks++;
        if (r8 !== aes_mul(8'(x), 8'(y))) begin
          failures++;
          if (failures < 10) $display("FAIL aes %h*%h got %h", x, y, r8);
        end
      end
    c8 = clmul8(8'h57, 8'h83);
    #1;
    checks++;
    if (r8 !== 8'hC1) begin
      failures++;
      $display("FAIL FIPS-197 example got %h", r8);
    end

    f = '0;
    f[NB] = 1'b1; f[9] = 1'b1; f[4] = 1'b1; f[2] = 1'b1; f[0] = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int w = 0; w < (2 * NB - 1 + 31) / 32; w++)
        cb[w*32 +: 32] = $urandom;
      if (t == 0) cb = '1;
      if (t == 1) cb = (2*NB-1)'(1) << (2 * NB - 2);
      #1;
      // Long division: quotient bits times f, accumulated, plus remainder.
      rem = cb;
      q_times_f = '0;
      for (int i = 2 * NB - 2; i >= int'(NB); i--)
        if (rem[i]) begin
          rem = rem ^ ((2*NB-1)'(f) << (i - NB));
          q_times_f = q_times_f ^ ((2*NB-1)'(f) << (i - NB));
        end
      rebuilt = q_times_f ^ (2*NB-1)'(rb);
      checks++;
      if (rebuilt !== cb || rem[NB-1:0] !== rb) begin
        failures++;
        if (failures < 10) $display("FAIL 232-bit reduction, test %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
