// current_dac_model: behavioural model of the DCO's current-mode DAC (not
// synthesizable logic: it stands for an analog block).
//
// Three current DACs are summed at one node: a 6-bit coarse DAC driven by the
// frequency loop, a 10-bit segmented fine DAC (4 binary-weighted LSB sources plus
// 63 thermometer-coded unit sources of 16 LSBs each) driven by the phase loop,
// and a 3-level pedestal DAC of two identical calibration sources. The output is
// the total current expressed as an integer number of fine-DAC LSB currents.
// Ideal sources are assumed: no mismatch, glitches or settling, and the output
// follows the inputs at once.
//
// The three DACs, their resolutions and the two-source pedestal follow the design
// description. The relative weights are chosen to match its stated frequency
// steps: coarse LSB about 4.7 MHz and pedestal source about 20 MHz, with the fine
// LSB set to 1/64 of a coarse LSB (about 73 kHz) so the whole DCO resolves about
// 12 bits over its 300 MHz range.
module current_dac_model
  import adpll_pkg::*;
#(
  parameter int unsigned COARSE_UNITS = 64,    // fine LSBs per coarse LSB
  parameter int unsigned PED_UNITS    = 272    // fine LSBs per pedestal source
) (
  input  logic [COARSE_W-1:0]   coarse,
  input  logic [FINE_BIN_W-1:0] fine_bin,
  input  logic [N_UNARY-1:0]    fine_unary,
  input  logic [1:0]            pedestal,      // thermometer: 00, 01, 11
  output logic [15:0]           i_units        // total current in fine LSBs
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    int unsigned acc;
    acc = int'(coarse) * COARSE_UNITS + int'(fine_bin);
    for (int i = 0; i < N_UNARY; i++)
      if (fine_unary[i]) acc += (1 << FINE_BIN_W);
    for (int i = 0; i < 2; i++)
      if (pedestal[i]) acc += PED_UNITS;
    i_units = 16'(acc);
  end
endmodule
