// ico_model: behavioural model of the current-controlled ring oscillator with its
// bias block and output comparator (not synthesizable: it stands for an analog
// block and uses delays).
//
// The oscillator frequency is linear in the control current,
// f = F0_MHZ + i_units * KF_MHZ, clamped to the 100..400 MHz design range, and
// the model produces rail-to-rail complementary outputs as the comparator does.
// Each half period is computed from the current seen at the start of that half
// period, so a change of the control word shows up within half a DCO cycle and
// the output phase is continuous. enable = 0 stops the oscillator with out_p low.
//
// A linear current-to-frequency characteristic over about 100 to 400 MHz follows
// the design description. F0_MHZ and KF_MHZ are this design's values: with the
// default DAC weights, coarse 32, fine 512 and one pedestal source give 280 MHz.
// Changing F0_MHZ models a process, voltage or temperature shift of the centre
// frequency. No noise is modelled.
module ico_model #(
  parameter real F0_MHZ   = 72.0,
  parameter real KF_MHZ   = 0.0734375,      // 4.7 MHz / 64 per fine LSB
  parameter real FMIN_MHZ = 100.0,
  parameter real FMAX_MHZ = 400.0
) (
  input  logic        enable,
  input  logic [15:0] i_units,
  output logic        out_p,
  output logic        out_n
);
  timeunit 1ns;
  timeprecision 1ps;

  real f_mhz;

  always_comb begin
    f_mhz = F0_MHZ + real'(i_units) * KF_MHZ;
    if (f_mhz < FMIN_MHZ) f_mhz = FMIN_MHZ;
    if (f_mhz > FMAX_MHZ) f_mhz = FMAX_MHZ;
  end

  initial out_p = 1'b0;

  always begin
    if (!enable) begin
      out_p = 1'b0;
      @(posedge enable);
    end
    #(500.0 / f_mhz);
    if (enable) out_p = ~out_p;
  end

  assign out_n = ~out_p;
endmodule
