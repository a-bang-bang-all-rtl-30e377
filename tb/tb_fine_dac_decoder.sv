// tb_fine_dac_decoder: exhaustive over all 1024 fine codes. The binary outputs
// must equal the 4 LSBs, exactly code[9:4] unit cells must be on, and raising
// the code by one unit (16 LSBs) must switch exactly one more cell on while
// leaving every cell that was on still on (thermometer, monotonic).
`timescale 1ns/1ps
module tb_fine_dac_decoder;
  logic [9:0]  code;
  logic [3:0]  bin;
  logic [62:0] unary, prev;
  int checks = 0, failures = 0;

  fine_dac_decoder dut (.code, .bin, .unary);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int c = 0; c < 1024; c++) begin
      code = 10'(c);
      #1;
      check(bin == 4'(c % 16), $sformatf("code %0d bin %0d", c, bin));
      check($countones(unary) == c / 16, $sformatf("code %0d: %0d cells on", c, $countones(unary)));
      // cell order: cells 0 .. n-1 on
      check(unary == 63'((64'(1) << (c / 16)) - 1), $sformatf("code %0d: cells %h", c, unary));
      if (c >= 16 && c % 16 == 0)
        check(((prev & ~unary) == '0) && ($countones(unary ^ prev) == 1),
              $sformatf("code %0d: not a one-cell thermometer step", c));
      if (c % 16 == 0) prev = unary;
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
