// tb_serializer: clocks the serializer with a 280 MHz DCO clock phase aligned
// to a 10 MHz reference, pulses load once every 28 DCO cycles in the middle of
// each reference period, and rebuilds each 28-bit word from sdata starting at
// sframe. Every word must equal {adc_a, adc_b} sampled at the preceding
// reference edge, MSB first.
`timescale 1ns/1ps
module tb_serializer;
  logic ref_clk = 0, dco_clk = 0, rst_n = 1, load = 0, sdata, sframe;
  logic [13:0] adc_a = '0, adc_b = '0;
  int checks = 0, failures = 0;

  initial #0.5 rst_n = 1'b0;

  always #50 ref_clk = ~ref_clk;
  initial begin
    #0.2;
    forever #(50.0 / 28.0) dco_clk = ~dco_clk;
  end

  serializer dut (.ref_clk, .dco_clk, .rst_n, .adc_a, .adc_b, .load, .sdata, .sframe);

  logic [27:0] sampled;
  always @(posedge ref_clk) begin
    sampled <= {adc_a, adc_b};
    adc_a   <= 14'($urandom);
    adc_b   <= 14'($urandom);
  end

  // load strobe: cycle 13 of each 28-cycle frame counted from the ref edge
  int cyc = 0;
  always @(posedge ref_clk) cyc = 0;
  always @(posedge dco_clk) begin
    cyc++;
  end
  always @(negedge dco_clk) load = rst_n && (cyc == 13);

  logic [27:0] rx, expect_w;
  int n = -1;
  always @(negedge dco_clk) begin
    if (sframe) begin
      rx = {27'b0, sdata};
      n = 1;
      expect_w = sampled;
    end else if (n > 0) begin
      rx = {rx[26:0], sdata};
      n++;
    end
    if (n == 28) begin
      n = -1;
      checks++;
      if (rx !== expect_w) begin
        failures++;
        if (failures < 10) $display("FAIL %0t: got %h expected %h", $time, rx, expect_w);
      end
    end
  end

  initial begin
    #20 rst_n = 1;
    repeat (60) @(posedge ref_clk);
    if (checks < 50) begin failures++; $display("FAIL only %0d words", checks); end
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
