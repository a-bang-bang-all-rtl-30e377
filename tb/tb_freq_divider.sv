// tb_freq_divider: checks the feedback divider. With the default reset count 13
// the counter must run 0..13 and fb_clk must have a period of exactly 28 DCO
// cycles with 14 high and 14 low; frame must mark the cycle before fb_clk
// falls. A second instance with reset count 5 must divide by 12.
`timescale 1ns/1ps
module tb_freq_divider;
  logic clk = 0, rst_n = 1;
  logic fb28, fb12, fr28, fr12;
  logic [3:0] c28, c12;
  // reset pulse: a falling edge so the asynchronous resets act
  initial #0.5 rst_n = 1'b0;

  int checks = 0, failures = 0;

  always #1.785 clk = ~clk;

  freq_divider                      u28 (.dco_clk(clk), .rst_n, .fb_clk(fb28), .count(c28), .frame(fr28));
  freq_divider #(.CNT_W(4), .M(5))  u12 (.dco_clk(clk), .rst_n, .fb_clk(fb12), .count(c12), .frame(fr12));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // reference model of the counter and divide-by-two
  int m28 = 0, m12 = 0;
  bit f28 = 0, f12 = 0;
  int cyc = 0, hi28 = 0, lo28 = 0, last_rise28 = -1, last_rise12 = -1;
  logic fb28_q = 0, fb12_q = 0;

  always @(posedge clk) if (rst_n) begin
    // model update for this edge
    if (m28 == 13) begin m28 = 0; f28 = ~f28; end else m28++;
    if (m12 == 5)  begin m12 = 0; f12 = ~f12; end else m12++;
    cyc++;
  end

  always @(negedge clk) if (rst_n) begin
    check(c28 == 4'(m28) && fb28 == f28, $sformatf("div28 count %0d/%0d fb %0d/%0d", c28, m28, fb28, f28));
    check(c12 == 4'(m12) && fb12 == f12, $sformatf("div12 count %0d/%0d fb %0d/%0d", c12, m12, fb12, f12));
    check(fr28 == (c28 == 13 && fb28), "frame strobe");
    if (fb28 && !fb28_q) begin
      if (last_rise28 >= 0) check(cyc - last_rise28 == 28, $sformatf("div28 period %0d", cyc - last_rise28));
      last_rise28 = cyc;
    end
    if (fb12 && !fb12_q) begin
      if (last_rise12 >= 0) check(cyc - last_rise12 == 12, $sformatf("div12 period %0d", cyc - last_rise12));
      last_rise12 = cyc;
    end
    if (fb28) hi28++; else lo28++;
    fb28_q = fb28; fb12_q = fb12;
  end

  initial begin
    #10 rst_n = 1;
    repeat (28 * 20) @(posedge clk);
    @(negedge clk);
    check(hi28 - lo28 <= 14 && lo28 - hi28 <= 14, $sformatf("duty %0d high %0d low", hi28, lo28));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
