// bbpd: bang-bang (lead-lag) phase detector, a single D flip-flop.
//
// On every rising edge of the reference clock the flip-flop samples the divided
// feedback clock. If the feedback clock is already high, its rising edge came
// first, so the feedback clock leads and early = 1; otherwise the reference leads
// and early = 0. The loop filter adds KP/KI when early = 0 and subtracts them when
// early = 1, which makes the overall feedback negative. One flip-flop as the whole
// phase detector follows the design description; sampling the feedback clock with
// the reference clock (rather than the reverse) is this design's choice, made so
// that the detector output is synchronous to the reference clock like the loop
// filter that consumes it. Reset clears the output (asynchronous, active low).
module bbpd (
  input  logic ref_clk,   // reference clock
  input  logic rst_n,
  input  logic fb_clk,    // divided DCO clock, used here as data
  output logic early      // 1: feedback leads reference (DCO too early/fast)
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) early <= 1'b0;
    else        early <= fb_clk;
  end
endmodule
