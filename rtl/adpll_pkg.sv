// adpll_pkg: widths and default constants shared by the bang-bang ADPLL blocks.
// The word widths follow the design description: a 6-bit coarse (frequency loop)
// DCO word, a 10-bit fine (phase loop) DCO word split into 4 binary LSBs and 6
// thermometer-coded MSBs, a 6-bit DCO edge counter and a divider reset count of 13
// (divide ratio 2*(13+1) = 28). The loop gains KP = 4 and KI = 1 are the hard-coded
// values of the described implementation.
package adpll_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned COARSE_W   = 6;
  localparam int unsigned FINE_W     = 10;
  localparam int unsigned FINE_BIN_W = 4;                       // binary-weighted LSBs
  localparam int unsigned FINE_UNA_W = FINE_W - FINE_BIN_W;     // thermometer-coded MSBs
  localparam int unsigned N_UNARY    = (1 << FINE_UNA_W) - 1;   // 63 unit current cells
  localparam int unsigned CNT_W      = 6;                       // frequency detector counter
  localparam int unsigned FERR_W     = CNT_W + 1;               // error word: 6 bits + sign
  localparam int unsigned DIV_M      = 13;                      // divider reset count
  localparam int unsigned FCW_DEF    = 2 * (DIV_M + 1);         // 28
  localparam int unsigned KP_DEF     = 4;
  localparam int unsigned KI_DEF     = 1;
  localparam logic [COARSE_W-1:0] COARSE_CENTER = COARSE_W'(1 << (COARSE_W - 1)); // 32
  localparam logic [FINE_W-1:0]   FINE_INIT     = FINE_W'(1 << (FINE_W - 1));     // 512
endpackage
