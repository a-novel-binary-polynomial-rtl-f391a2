// tb_sbm_mult: self-checking test of the schoolbook multiplier.
//
// An 6-bit instance is checked exhaustively and a 26-bit instance (the leaf
// size of the default composite multiplier) with random and corner operands.
// The reference is a shift-and-XOR carry-less product worked out here.
module tb_sbm_mult;

  localparam int unsigned NS = 6;
  localparam int unsigned NL = 26;

  int unsigned checks = 0, failures = 0;

  logic [NS-1:0]    as, bs;
  logic [2*NS-2:0]  ps;
  logic [NL-1:0]    al, bl;
  logic [2*NL-2:0]  pl;

  sbm_mult #(.N(NS)) dut_s (.a(as), .b(bs), .p(ps));
  sbm_mult #(.N(NL)) dut_l (.a(al), .b(bl), .p(pl));

  function automatic logic [63:0] clmul(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] acc;
    acc = '0;
    for (int i = 0; i < 32; i++)
      if (y[i]) acc = acc ^ (64'(x) << i);
    return acc;
  endfunction

  task automatic check_l(input logic [NL-1:0] x, input logic [NL-1:0] y);
    logic [63:0] ref_p;
    al = x;
    bl = y;
    #1;
    ref_p = clmul(32'(x), 32'(y));
    checks++;
    if (pl !== ref_p[2*NL-2:0]) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h got %h exp %h", NL, x, y, pl, ref_p[2*NL-2:0]);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ref_p;
    for (int x = 0; x < (1 << NS); x++)
      for (int y = 0; y < (1 << NS); y++) begin
        as = NS'(x);
        bs = NS'(y);
        #1;
        ref_p = clmul(32'(x), 32'(y));
        checks++;
        if (ps !== ref_p[2*NS-2:0]) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d a=%h b=%h got %h", NS, x, y, ps);
        end
      end
    check_l('1, '1);
    check_l('0, '1);
    check_l(NL'(1), '1);
    check_l(NL'(1) << (NL - 1), NL'(1) << (NL - 1));
    repeat (2000) check_l(NL'($urandom), NL'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
