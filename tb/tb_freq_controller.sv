// tb_freq_controller: checks the coarse accumulator against an integer model:
// coarse += ferr while enabled and valid, saturating at 0 and 63, held while
// disabled or invalid, and loaded with the centre code 32 by init.
`timescale 1ns/1ps
module tb_freq_controller;
  logic clk = 0, rst_n = 1, init = 0, enable = 0, valid = 0;
  logic signed [6:0] ferr = 0;
  logic [5:0] coarse;
  // reset pulse: a falling edge so the asynchronous resets act
  initial #0.5 rst_n = 1'b0;

  int checks = 0, failures = 0, model = 32, n_sat = 0;

  always #50 clk = ~clk;

  freq_controller dut (.ref_clk(clk), .rst_n, .init, .enable, .valid, .ferr, .coarse);

  task automatic step(input int e, input bit en, input bit v, input bit in_init);
    ferr = 7'(e); enable = en; valid = v; init = in_init;
    @(posedge clk);
    if (in_init) model = 32;
    else if (en && v) begin
      model = model + e;
      if (model < 0) begin model = 0; n_sat++; end
      if (model > 63) begin model = 63; n_sat++; end
    end
    #1;
    checks++;
    if (coarse !== 6'(model)) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: ferr=%0d en=%0d v=%0d coarse=%0d expected %0d", $time, e, en, v, coarse, model);
    end
  endtask

  initial begin
    #20 rst_n = 1;
    #1;
    checks++; if (coarse !== 6'd32) begin failures++; $display("FAIL reset value %0d", coarse); end
    step(5, 1, 1, 0);
    step(-3, 1, 1, 0);
    step(7, 0, 1, 0);
    step(7, 1, 0, 0);
    repeat (10) step(20, 1, 1, 0);        // saturate high
    repeat (10) step(-36, 1, 1, 0);       // saturate low
    step(0, 1, 1, 1);
    repeat (500) step($urandom_range(0, 30) - 15, $urandom_range(0, 3) != 0,
                      $urandom_range(0, 7) != 0, $urandom_range(0, 99) == 0);
    checks++;
    if (n_sat < 2) begin failures++; $display("FAIL saturation not exercised"); end
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
