// freq_detector: measures the DCO frequency in units of the reference frequency.
//
// A 6-bit JK counter counts DCO clock edges. The reference clock is retimed into
// the DCO clock domain by two flip-flops; the rising edge of the retimed reference
// strobes a sampler that stores the count and restarts the counter. The stored
// value is the number of DCO periods in the last reference period
// (f_dco / f_ref, e.g. 28 at 280 MHz for a 10 MHz reference). The frequency
// error is ferr = FCW - count, computed by a 7-bit (6 bits plus sign) ripple
// adder/subtractor, so ferr > 0 means the DCO is too slow. Resolution is one
// reference frequency (10 MHz).
//
// Counting DCO edges per reference period, the 6-bit counter, retiming the
// reference before sampling and ferr = FCW - count follow the design description.
// The retiming is done here with a two-flip-flop synchronizer and a synchronous
// restart of the counter in the DCO clock domain instead of delay cells and an
// asynchronous reset pulse (this design's choice). ferr only changes a few DCO cycles after a
// reference edge and then holds for a whole reference period, so the reference
// clock domain can sample it on its next edge. valid rises once a full period has
// been measured and stays high.
module freq_detector
  import adpll_pkg::*;
#(
  parameter int unsigned FCW = FCW_DEF
) (
  input  logic                     dco_clk,
  input  logic                     rst_n,
  input  logic                     ref_clk,     // used as data, retimed here
  output logic [CNT_W-1:0]         count,       // DCO periods in last ref period (wraps at 64)
  output logic signed [FERR_W-1:0] ferr,        // FCW - count
  output logic                     valid
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [2:0]       ref_sync;
  logic             ref_rise;
  logic [CNT_W-1:0] q;
  logic [CNT_W-1:0] hold;
  logic [1:0]       n_meas;

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) ref_sync <= '0;
    else        ref_sync <= {ref_sync[1:0], ref_clk};
  end
  assign ref_rise = ref_sync[1] & ~ref_sync[2];

  // the counter restarts at 1 on the sampling edge, so at the next sampling
  // edge it holds the number of DCO periods between the two
  jk_counter #(.WIDTH(CNT_W)) u_cnt (
    .clk     (dco_clk),
    .rst_n   (rst_n),
    .restart (ref_rise),
    .q       (q)
  );

  // sampler; the first sample after reset is a partial period and not valid
  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      hold   <= '0;
      n_meas <= '0;
    end else if (ref_rise) begin
      hold <= q;
      if (n_meas != 2'd2) n_meas <= n_meas + 2'd1;
    end
  end

  assign count = hold;
  assign valid = (n_meas == 2'd2);

  adder_subtractor #(.WIDTH(FERR_W), .NONNEG_ONLY(1'b0)) u_sub (
    .a        (FERR_W'(FCW)),
    .b        ({1'b0, hold}),
    .sub      (1'b1),
    .sum      (ferr),
    .overflow ()
  );
endmodule
