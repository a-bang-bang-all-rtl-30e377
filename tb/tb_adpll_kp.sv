// tb_adpll_kp: loop-gain study. Three copies of the PLL with KI = 1 and
// KP = 3, 4 and 8 run from the same 10 MHz reference, each starting with its
// DCO about 20 MHz low. For each copy the test measures the phase-lock time
// (from reset release until the feedback edge stays within 0.5 ns of the
// reference edge for 32 periods in a row) and the peak-to-peak phase error of
// the steady-state limit cycle over the following 400 periods. KP = 3 must
// lock clearly slower than KP = 4 and 8, KP = 8 must give a larger limit cycle
// than KP = 3 and 4, and KP = 4 and 8 must lock within 50 us (100 us for KP = 3).
`timescale 1ns/1ps
module tb_adpll_kp;
  localparam int NK = 3;
  localparam int KPS[NK] = '{3, 4, 8};

  logic ref_clk = 1'b0;
  logic rst_n   = 1'b1;
  int checks = 0, failures = 0;

  initial #0.5 rst_n = 1'b0;
  always #50 ref_clk = ~ref_clk;

  realtime t_ref = 0;
  realtime t_release = 0;
  always @(posedge ref_clk) t_ref = $realtime;

  real     lock_ns [NK];
  real     pp_ns   [NK];

  for (genvar g = 0; g < NK; g++) begin : g_pll
    logic        clk_out, clk_out_n, fb_clk, sdata, sframe, fll_active, locked, early;
    logic [5:0]  coarse, dco_count;
    logic [9:0]  fine;

    adpll_top #(.KP(KPS[g]), .KI(1)) dut (
      .ref_clk, .rst_n, .pedestal(2'b00), .adc_a(14'h0), .adc_b(14'h0),
      .clk_out, .clk_out_n, .fb_clk, .sdata, .sframe, .coarse, .fine,
      .dco_count, .fll_active, .locked, .early
    );

    int  run = 0, n_meas = 0;
    real emin = 1.0e9, emax = -1.0e9;
    initial begin lock_ns[g] = -1.0; pp_ns[g] = -1.0; end

    always @(posedge fb_clk) if (rst_n && locked) begin
      real e;
      e = $realtime - t_ref;
      if (e > 50.0) e = e - 100.0;
      if (lock_ns[g] < 0.0) begin
        if (e < 0.5 && e > -0.5) run++; else run = 0;
        if (run == 32) lock_ns[g] = $realtime - t_release;
      end else if (n_meas < 400) begin
        if (e < emin) emin = e;
        if (e > emax) emax = e;
        n_meas++;
        if (n_meas == 400) pp_ns[g] = emax - emin;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000 rst_n = 1'b1;
    t_release = $realtime;
    wait (pp_ns[0] >= 0.0 && pp_ns[1] >= 0.0 && pp_ns[2] >= 0.0);
    for (int k = 0; k < NK; k++) begin
      $display("KP=%0d KI=1: phase lock after %0.2f us, limit cycle %0.3f ns peak-to-peak",
               KPS[k], lock_ns[k] / 1000.0, pp_ns[k]);
      check(lock_ns[k] > 0.0 && lock_ns[k] < (KPS[k] >= 4 ? 50000.0 : 100000.0),
            $sformatf("KP=%0d lock time %0.1f ns", KPS[k], lock_ns[k]));
    end
    check(lock_ns[0] > 1.2 * lock_ns[1] && lock_ns[0] > 1.2 * lock_ns[2], "KP=3 locks clearly slower than KP=4 and KP=8");
    check(pp_ns[2] > pp_ns[1], "limit cycle grows from KP=4 to KP=8");
    check(pp_ns[2] > pp_ns[0], "limit cycle grows from KP=3 to KP=8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
