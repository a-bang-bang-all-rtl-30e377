// tb_adder_subtractor: exhaustive test of the 7-bit ripple adder/subtractor, in
// both its signed form and the form where a negative result counts as overflow.
// Expected sums and overflow flags are computed with integer arithmetic.
`timescale 1ns/1ps
module tb_adder_subtractor;
  logic [6:0] a, b, s0, s1;
  logic       sub, o0, o1;
  int checks = 0, failures = 0;

  adder_subtractor #(.WIDTH(7), .NONNEG_ONLY(1'b0)) u_s (.a, .b, .sub, .sum(s0), .overflow(o0));
  adder_subtractor #(.WIDTH(7), .NONNEG_ONLY(1'b1)) u_n (.a, .b, .sub, .sum(s1), .overflow(o1));

  initial begin
    for (int op = 0; op < 2; op++)
      for (int ia = 0; ia < 128; ia++)
        for (int ib = 0; ib < 128; ib++) begin
          int sa, sb, r;
          bit ovf;
          logic [6:0] exp_s;
          a = 7'(ia); b = 7'(ib); sub = op[0];
          #1;
          sa = (ia >= 64) ? ia - 128 : ia;
          sb = (ib >= 64) ? ib - 128 : ib;
          r = op ? sa - sb : sa + sb;
          exp_s = 7'(r);
          ovf = (r > 63) || (r < -64);
          checks++;
          if (s0 !== exp_s || o0 !== ovf || s1 !== exp_s || o1 !== (ovf || exp_s[6])) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d sub=%0d: sum %0d/%0d ovf %0d/%0d nonneg-ovf %0d",
                       sa, sb, op, s0, exp_s, o0, ovf, o1);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
