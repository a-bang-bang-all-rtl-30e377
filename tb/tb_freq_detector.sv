// tb_freq_detector: runs the frequency detector with DCO periods that give an
// exact, known number of DCO cycles per 100 ns reference period (20, 25, 28, 32
// and 40) and checks count and ferr = 28 - count after each change, plus the
// valid flag after reset.
`timescale 1ns/1ps
module tb_freq_detector;
  logic dco_clk = 0, ref_clk = 0, rst_n = 1;
  logic [5:0] count;
  logic signed [6:0] ferr;
  logic valid;
  // reset pulse: a falling edge so the asynchronous resets act
  initial #0.5 rst_n = 1'b0;

  int checks = 0, failures = 0;
  real dco_half = 100.0 / 56.0;

  always #50 ref_clk = ~ref_clk;
  initial begin
    #0.3;
    forever #(dco_half) dco_clk = ~dco_clk;
  end

  freq_detector dut (.dco_clk, .rst_n, .ref_clk, .count, .ferr, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int ratios[5] = '{28, 20, 25, 32, 40};
    #20 rst_n = 1;
    @(posedge ref_clk);
    #1 check(!valid, "valid low right after reset");
    foreach (ratios[i]) begin
      dco_half = 50.0 / ratios[i];
      repeat (4) @(posedge ref_clk);
      repeat (5) begin
        @(posedge ref_clk);
        #1;
        check(valid, "valid");
        check(count == 6'(ratios[i]), $sformatf("count %0d expected %0d", count, ratios[i]));
        check(ferr == 7'(28 - ratios[i]), $sformatf("ferr %0d expected %0d", ferr, 28 - ratios[i]));
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
