// tb_adpll_top: end-to-end test of the bang-bang ADPLL at its default parameters.
//
// A 10 MHz reference drives the PLL from reset. The test waits for frequency
// acquisition and lock, then checks that the output runs at 28 x the reference
// (clk_out edges per reference period), that the divided clock is phase aligned
// with the reference, and that the serializer output, deserialized here, carries
// the ADC words. It then steps the reference to 125 % and 75 % of nominal (the
// frequency loop must re-engage and relock at 28 x), applies a 180 degree
// reference phase step (the phase loop must realign) and changes the DCO
// pedestal trim. Each loop mechanism is counted; a mechanism that never occurs
// counts as a failure.
`timescale 1ns/1ps
module tb_adpll_top;
  logic        ref_clk = 1'b0;
  logic        rst_n   = 1'b1;
  logic [1:0]  pedestal = 2'b00;   // DCO starts about 20 MHz below centre
  logic [13:0] adc_a = '0, adc_b = '0;
  logic        clk_out, clk_out_n, fb_clk, sdata, sframe, fll_active, locked, early;
  logic [5:0]  coarse, dco_count;
  logic [9:0]  fine;

  adpll_top dut (.*);

  // reset pulse: a falling edge so the asynchronous resets act
  initial #0.5 rst_n = 1'b0;

  int checks = 0, failures = 0;
  real ref_half = 50.0;            // ns, 10 MHz
  bit  phase_flip = 0;

  // reference clock with programmable period and a one-shot 180 degree step
  always begin
    #(ref_half);
    if (phase_flip) begin
      phase_flip = 0;              // skip one toggle: 180 degree phase shift
    end else begin
      ref_clk = ~ref_clk;
    end
  end

  // ADC words change on every reference edge
  always @(posedge ref_clk) begin
    adc_a <= 14'($urandom);
    adc_b <= 14'($urandom);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_fll_updates = 0, n_lock_enter = 0, n_lock_exit = 0;
  int n_pd_up = 0, n_pd_dn = 0, n_ser_words = 0, n_phase_step = 0, n_freq_step = 0;
  logic [5:0] coarse_q;
  logic       locked_q;
  always @(posedge ref_clk) begin
    coarse_q <= coarse;
    locked_q <= locked;
    if (rst_n && coarse != coarse_q) n_fll_updates++;
    if (locked && !locked_q) n_lock_enter++;
    if (!locked && locked_q) n_lock_exit++;
    if (locked && rst_n) begin
      if (early) n_pd_dn++; else n_pd_up++;
    end
  end

  // ---------------- DCO period counting and phase error ----------------
  int  edges = 0;
  always @(posedge clk_out) edges++;

  realtime t_ref = 0, t_fb = 0;
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge fb_clk)  t_fb  = $realtime;

  // ---------------- deserializer: rebuild the words sent ----------------
  // words sampled on ref edges are remembered in order; the serializer sends
  // each one in the next frame
  logic [27:0] sent_q[$];
  logic [27:0] rx;
  int          rx_n = -1;
  bit          ser_check_on = 0;
  int          ser_bad = 0;
  int          rx_skip = 2;     // words already in flight when checking starts
  always @(posedge ref_clk) if (ser_check_on) sent_q.push_back({adc_a, adc_b});
  always @(negedge clk_out) begin
    if (sframe) begin
      rx   = {27'b0, sdata};
      rx_n = 1;
    end else if (rx_n > 0) begin
      rx = {rx[26:0], sdata};
      rx_n++;
    end
    if (rx_n == 28) begin
      rx_n = -1;
      if (ser_check_on && rx_skip > 0) rx_skip--;
      else if (ser_check_on && sent_q.size() > 0) begin
        // the word must be one of those sampled since the last match
        int idx = -1;
        foreach (sent_q[i]) if (idx < 0 && sent_q[i] == rx) idx = i;
        if (idx >= 0) begin
          n_ser_words++;
          repeat (idx + 1) void'(sent_q.pop_front());
        end else begin
          ser_bad++;
        end
      end
    end
  end

  // ---------------- helpers ----------------
  task automatic wait_ref(input int n);
    repeat (n) @(posedge ref_clk);
  endtask

  // wait for locked, then let the phase loop settle
  task automatic wait_lock(input string tag, input int max_ref);
    int k = 0;
    while (!locked && k < max_ref) begin
      @(posedge ref_clk);
      k++;
    end
    check(locked, $sformatf("%s: lock within %0d reference periods", tag, max_ref));
    $display("%s: locked after %0d reference periods, coarse=%0d", tag, k, coarse);
  endtask

  // output edges over n reference periods must be 28 * n (+-1)
  task automatic check_freq(input string tag, input int n);
    int e0, d;
    @(posedge ref_clk);
    e0 = edges;
    wait_ref(n);
    d = edges - e0;
    check(d >= 28 * n - 1 && d <= 28 * n + 1,
          $sformatf("%s: %0d DCO edges in %0d reference periods, expected %0d", tag, d, n, 28 * n));
  endtask

  // phase error between reference and feedback rising edges
  task automatic check_phase(input string tag, input int n, input real max_ns);
    real worst = 0.0, e;
    repeat (n) begin
      // the next feedback edge after a reference edge; an edge slightly early
      // shows up almost a full period late and is folded back
      @(posedge ref_clk);
      @(posedge fb_clk);
      e = $realtime - t_ref;
      if (e > ref_half) e = e - 2.0 * ref_half;
      if (e < 0) e = -e;
      if (e > worst) worst = e;
    end
    check(worst < max_ns, $sformatf("%s: worst phase error %0.3f ns (limit %0.1f)", tag, worst, max_ns));
    $display("%s: worst |phase error| over %0d periods = %0.3f ns, fine=%0d", tag, n, worst, fine);
  endtask

  initial begin
    #1000 rst_n = 1'b1;
    // startup: FLL acquisition then PLL
    wait_lock("startup", 2000);
    check(!fll_active, "FLL disabled once locked");
    wait_ref(1500);
    check(locked, "lock held while the phase loop tracks");
    check_freq("startup", 200);
    check_phase("startup", 200, 1.5);
    ser_check_on = 1;
    wait_ref(100);
    check(n_ser_words > 50 && ser_bad == 0,
          $sformatf("serializer: %0d words matched, %0d bad", n_ser_words, ser_bad));

    // frequency step to 125 % of the reference frequency
    ser_check_on = 0;
    n_freq_step++;
    ref_half = 40.0;
    wait_ref(20);
    wait_lock("ref 12.5 MHz", 3000);
    wait_ref(1500);
    check_freq("ref 12.5 MHz", 200);
    check_phase("ref 12.5 MHz", 200, 1.5);

    // frequency step to 75 %
    n_freq_step++;
    ref_half = 66.667;
    wait_ref(20);
    wait_lock("ref 7.5 MHz", 3000);
    wait_ref(1500);
    check_freq("ref 7.5 MHz", 200);
    check_phase("ref 7.5 MHz", 200, 1.5);

    // back to nominal, then a 180 degree phase step
    n_freq_step++;
    ref_half = 50.0;
    wait_ref(20);
    wait_lock("ref 10 MHz", 3000);
    wait_ref(1500);
    @(posedge ref_clk);
    phase_flip = 1;
    n_phase_step++;
    wait_ref(3000);
    check(locked, "phase step: no loss of frequency lock needed to recover");
    check_freq("after phase step", 200);
    check_phase("after phase step", 200, 1.5);

    // pedestal trim: shifts the DCO centre by 40 MHz, the FLL must re-engage
    pedestal = 2'b11;
    wait_ref(20);
    wait_lock("pedestal 2", 3000);
    wait_ref(1500);
    check_freq("pedestal 2", 200);
    check_phase("pedestal 2", 200, 1.5);

    // every mechanism must have happened
    check(n_fll_updates > 0, $sformatf("FLL coarse updates: %0d", n_fll_updates));
    check(n_lock_enter >= 5, $sformatf("lock entries: %0d", n_lock_enter));
    check(n_lock_exit >= 4, $sformatf("lock exits (FLL re-engaged): %0d", n_lock_exit));
    check(n_pd_up > 0 && n_pd_dn > 0, $sformatf("bang-bang decisions up %0d down %0d", n_pd_up, n_pd_dn));
    check(n_ser_words > 0, "serializer words");
    check(n_freq_step == 3 && n_phase_step == 1, "reference steps applied");
    $display("mechanisms: fll_updates=%0d lock_enter=%0d lock_exit=%0d pd_up=%0d pd_dn=%0d ser_words=%0d freq_steps=%0d phase_steps=%0d",
             n_fll_updates, n_lock_enter, n_lock_exit, n_pd_up, n_pd_dn, n_ser_words, n_freq_step, n_phase_step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
