// tb_bbpd: the bang-bang detector must report early = 1 when the feedback clock
// rises before the reference clock and early = 0 when it rises after, for a
// sweep of phase offsets on both sides.
`timescale 1ns/1ps
module tb_bbpd;
  logic ref_clk = 0, fb_clk = 0, rst_n = 1, early;
  // reset pulse: a falling edge so the asynchronous resets act
  initial #0.5 rst_n = 1'b0;

  int checks = 0, failures = 0;

  bbpd dut (.ref_clk, .rst_n, .fb_clk, .early);

  initial begin
    #5 rst_n = 1;
    #5;
    for (int k = -20; k <= 20; k++) begin
      real off;
      if (k == 0) continue;
      off = k * 2.0;                       // ns, fb edge relative to ref edge
      // one 100 ns period with the fb edge at 'off' from the ref edge at 50 ns
      fork
        begin #(50.0 + off) fb_clk = 1; #50 fb_clk = 0; end
        begin #50 ref_clk = 1; #50 ref_clk = 0; end
      join
      #1;
      checks++;
      if (early !== (off < 0)) begin
        failures++;
        $display("FAIL offset %0.1f ns: early=%0d", off, early);
      end
      #20;
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
