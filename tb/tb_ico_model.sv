// tb_ico_model: measures the oscillator period for a set of control currents
// and compares the frequency with 72 MHz + i * 0.0734375 MHz, clamped to
// 100..400 MHz; checks that out_n is the complement of out_p and that the
// oscillator stops while disabled.
`timescale 1ns/1ps
module tb_ico_model;
  logic        enable = 1'b1;
  logic [15:0] i_units = 16'd2832;
  logic        out_p, out_n;
  int checks = 0, failures = 0;

  ico_model dut (.enable, .i_units, .out_p, .out_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int codes[6] = '{2832, 0, 500, 1500, 4000, 9000};
    foreach (codes[k]) begin
      realtime t0, t1;
      real f_exp, f_meas;
      i_units = 16'(codes[k]);
      repeat (3) @(posedge out_p);
      t0 = $realtime;
      repeat (100) @(posedge out_p);
      t1 = $realtime;
      f_meas = 100.0 * 1000.0 / (t1 - t0);
      f_exp  = 72.0 + codes[k] * 0.0734375;
      if (f_exp < 100.0) f_exp = 100.0;
      if (f_exp > 400.0) f_exp = 400.0;
      check(f_meas > f_exp * 0.999 && f_meas < f_exp * 1.001,
            $sformatf("i=%0d: %0.3f MHz, expected %0.3f", codes[k], f_meas, f_exp));
      check(out_n == ~out_p, "complementary outputs");
    end
    // disable: no edges for 1 us
    enable = 1'b0;
    #10;
    begin
      int n = 0;
      fork
        begin #1000; end
        forever begin @(posedge out_p); n++; end
      join_any
      disable fork;
      check(n == 0 && out_p == 1'b0, $sformatf("%0d edges while disabled", n));
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
