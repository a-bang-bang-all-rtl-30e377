// freq_controller: coarse frequency accumulator of the frequency-locked loop.
//
// Every reference period, while the loop is enabled (not locked) and the
// frequency detector's measurement is valid, the signed frequency error is added
// to the 6-bit coarse DCO tuning word through a 7-bit ripple adder (6 bits plus
// sign) whose overflow logic also flags a negative result. This accumulation is
// the digital counterpart of integration. On overflow the word saturates at 0 or
// 63. An initialisation multiplexer selected by init, which is synchronous to the
// reference clock, loads the centre code 32 so acquisition starts mid-range.
// Clocked by the reference clock; coarse changes one reference period after the
// error it used.
//
// Adding the error to the coarse word, the 6-bit word, the centre-code init
// multiplexer and the 7-bit adder with negative-result overflow follow the design
// description. Saturating on overflow is this design's choice.
module freq_controller
  import adpll_pkg::*;
(
  input  logic                     ref_clk,
  input  logic                     rst_n,
  input  logic                     init,        // load centre code
  input  logic                     enable,      // frequency loop active
  input  logic                     valid,       // measurement valid
  input  logic signed [FERR_W-1:0] ferr,
  output logic [COARSE_W-1:0]      coarse
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [FERR_W-1:0] sum;
  logic              ovf;

  adder_subtractor #(.WIDTH(FERR_W), .NONNEG_ONLY(1'b1)) u_acc (
    .a        ({1'b0, coarse}),
    .b        (ferr),
    .sub      (1'b0),
    .sum      (sum),
    .overflow (ovf)
  );

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)                coarse <= COARSE_CENTER;
    else if (init)             coarse <= COARSE_CENTER;
    else if (enable && valid) begin
      if (!ovf)                coarse <= sum[COARSE_W-1:0];
      else if (ferr[FERR_W-1]) coarse <= '0;      // went negative
      else                     coarse <= '1;      // went past full scale
    end
  end
endmodule
