// tb_lock_detect: feeds sequences of frequency errors and checks that locked
// rises only after 4 consecutive in-window (|ferr| <= 1) values, falls only
// after 4 consecutive out-of-window values, ignores invalid measurements and is
// cleared by init. The expected output comes from a small model.
`timescale 1ns/1ps
module tb_lock_detect;
  logic clk = 0, rst_n = 1, init = 0, valid = 0, locked;
  logic signed [6:0] ferr = 0;
  // reset pulse: a falling edge so the asynchronous resets act
  initial #0.5 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int run = 0, n_rise = 0, n_fall = 0;
  bit m_locked = 0;

  always #50 clk = ~clk;

  lock_detect dut (.ref_clk(clk), .rst_n, .init, .ferr, .valid, .locked);

  task automatic step(input int e, input bit v, input bit in_init);
    bit inw;
    ferr = 7'(e); valid = v; init = in_init;
    @(posedge clk);
    inw = (e >= -1 && e <= 1);
    if (in_init) begin m_locked = 0; run = 0; end
    else if (v) begin
      if (inw != m_locked) begin
        if (run == 3) begin
          m_locked = inw; run = 0;
          if (inw) n_rise++; else n_fall++;
        end else run++;
      end else run = 0;
    end
    #1;
    checks++;
    if (locked !== m_locked) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: ferr=%0d valid=%0d locked=%0d expected %0d", $time, e, v, locked, m_locked);
    end
  endtask

  initial begin
    #20 rst_n = 1;
    repeat (3) step(0, 1, 0);
    step(5, 1, 0);                       // breaks the run
    repeat (4) step(1, 1, 0);            // locks on the 4th
    repeat (3) step(-3, 1, 0);
    step(-1, 1, 0);
    repeat (4) step(9, 0, 0);            // invalid: ignored
    repeat (4) step(-2, 1, 0);           // unlocks
    for (int i = 0; i < 500; i++)
      step($urandom_range(0, 4) - 2, $urandom_range(0, 9) != 0, $urandom_range(0, 99) == 0);
    checks++;
    if (n_rise < 2 || n_fall < 2) begin
      failures++;
      $display("FAIL too few lock transitions: %0d rises, %0d falls", n_rise, n_fall);
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
