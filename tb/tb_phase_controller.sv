// tb_phase_controller: compares the loop filter with an integer model of
// I[n] = I[n-1] +- KI, D[n] = I[n] +- KP (+ when early = 0), including the init
// multiplexer and saturation at both ends of the 10-bit range. Runs the default
// gains (KP = 4, KI = 1) and a second instance with KP = 8, KI = 2.
`timescale 1ns/1ps
module tb_phase_controller;
  logic clk = 0, rst_n = 1, init_en = 1, early = 0;
  logic [9:0] integ_a, d_a, integ_b, d_b;
  // reset pulse: a falling edge so the asynchronous resets act
  initial #0.5 rst_n = 1'b0;

  int checks = 0, failures = 0;

  always #50 clk = ~clk;

  phase_controller                        u_a (.clk, .rst_n, .init_en, .early, .integ(integ_a), .d_fine(d_a));
  phase_controller #(.KP(8), .KI(2))      u_b (.clk, .rst_n, .init_en, .early, .integ(integ_b), .d_fine(d_b));

  int mi_a = 512, md_a = 512, mi_b = 512, md_b = 512;
  int n_sat_hi = 0, n_sat_lo = 0;

  function automatic void model(input int kp, input int ki, inout int mi, inout int md);
    int ni, nd;
    if (init_en) begin mi = 512; md = 512; return; end
    ni = early ? mi - ki : mi + ki;
    if (ni >= 0 && ni <= 1023) mi = ni;
    nd = early ? mi - kp : mi + kp;
    md = (nd < 0) ? 0 : (nd > 1023) ? 1023 : nd;
  endfunction

  task automatic step(input bit e, input bit ie);
    early = e; init_en = ie;
    @(posedge clk);
    model(4, 1, mi_a, md_a);
    model(8, 2, mi_b, md_b);
    #1;
    checks++;
    if (integ_a != 10'(mi_a) || d_a != 10'(md_a) || integ_b != 10'(mi_b) || d_b != 10'(md_b)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0t: a I=%0d/%0d D=%0d/%0d  b I=%0d/%0d D=%0d/%0d", $time,
                 integ_a, mi_a, d_a, md_a, integ_b, mi_b, d_b, md_b);
    end
    if (d_a == 10'd1023) n_sat_hi++;
    if (d_a == 10'd0) n_sat_lo++;
  endtask

  initial begin
    #20 rst_n = 1;
    step(0, 1);
    step(1, 1);
    // random decisions
    repeat (400) step(1'($urandom), 1'($urandom_range(0, 49) == 0));
    // long run up into saturation, then down into the other end
    repeat (1100) step(0, 0);
    repeat (1100) step(1, 0);
    repeat (50) step(1'($urandom), 0);
    step(0, 1);
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not reached: hi %0d lo %0d", n_sat_hi, n_sat_lo);
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
