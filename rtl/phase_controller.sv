// phase_controller: digital second-order loop filter of the bang-bang phase loop.
//
// The phase detector output is a single bit, so the gain stages reduce to
// adding or subtracting constants. Each cycle the integral branch computes
// I = I_prev +- KI and the output is D_fine = I +- KP, where + is used when the
// reference leads (early = 0) and - when the feedback leads (early = 1). This is
// the backward-Euler form of a proportional-integral filter:
// D_fine(z) = (KP + KI / (1 - z^-1)) * e(z), with e = +-1. Both operations use
// 11-bit ripple adder/subtractors (10-bit unsigned word plus sign) whose overflow
// logic flags negative results; on overflow the integral holds its value and the
// output saturates at 0 or 1023. An initialisation multiplexer forces both
// registers to D_INIT (half of full scale) while init_en is high, i.e. whenever
// the frequency loop is active.
//
// Timing: all registers are clocked by clk. In the design the registers take
// delayed copies of the reference clock so the update lands within the same
// reference period as the phase decision; here clk is meant to be the inverted
// reference clock, so D_fine updates half a reference period after the decision
// (loop delay D = 0.5 reference periods).
//
// The add/subtract structure, the polarity, the init multiplexer and the defaults
// KP = 4, KI = 1, D_INIT = 512 follow the design description. Holding/saturating
// on overflow and the single half-period delay are this design's choices.
module phase_controller
  import adpll_pkg::*;
#(
  parameter int unsigned          KP     = KP_DEF,
  parameter int unsigned          KI     = KI_DEF,
  parameter logic [FINE_W-1:0]    D_INIT = FINE_INIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_en,     // frequency loop active: hold D_INIT
  input  logic              early,       // bang-bang detector: 1 = feedback leads
  output logic [FINE_W-1:0] integ,       // integral branch register
  output logic [FINE_W-1:0] d_fine       // fine DCO control word
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = FINE_W + 1;

  logic [W-1:0] i_sum, p_sum;
  logic         i_ovf, p_ovf;
  logic [FINE_W-1:0] i_next;

  adder_subtractor #(.WIDTH(W), .NONNEG_ONLY(1'b1)) u_int (
    .a        ({1'b0, integ}),
    .b        (W'(KI)),
    .sub      (early),
    .sum      (i_sum),
    .overflow (i_ovf)
  );

  assign i_next = i_ovf ? integ : i_sum[FINE_W-1:0];

  adder_subtractor #(.WIDTH(W), .NONNEG_ONLY(1'b1)) u_prop (
    .a        ({1'b0, i_next}),
    .b        (W'(KP)),
    .sub      (early),
    .sum      (p_sum),
    .overflow (p_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ  <= D_INIT;
      d_fine <= D_INIT;
    end else if (init_en) begin
      integ  <= D_INIT;
      d_fine <= D_INIT;
    end else begin
      integ <= i_next;
      if (!p_ovf)     d_fine <= p_sum[FINE_W-1:0];
      else if (early) d_fine <= '0;
      else            d_fine <= '1;
    end
  end
endmodule
