// tb_jk_counter: the 6-bit JK counter must count up by one per clock, wrap at 64,
// and read 1 after a restart edge; random restarts are compared with a model.
`timescale 1ns/1ps
module tb_jk_counter;
  logic clk = 0, rst_n = 1, restart = 0;
  logic [5:0] q;
  // reset pulse: a falling edge so the asynchronous resets act
  initial #0.5 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int model = 0;

  always #2 clk = ~clk;

  jk_counter #(.WIDTH(6)) dut (.clk, .rst_n, .restart, .q);

  initial begin
    #5;
    @(negedge clk);
    rst_n = 1;
    checks++; if (q !== 6'd0) begin failures++; $display("FAIL reset value %0d", q); end
    for (int i = 0; i < 600; i++) begin
      restart = (i > 200) && ($urandom_range(0, 29) == 0);
      @(posedge clk);
      model = restart ? 1 : (model + 1) % 64;
      @(negedge clk);
      checks++;
      if (q !== 6'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: q=%0d expected %0d", i, q, model);
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
