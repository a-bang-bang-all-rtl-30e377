// serializer: parallel-in serial-out stage that the PLL clocks.
//
// Two 14-bit ADC words are sampled on every rising edge of the 10 MHz reference
// (the ADC sample clock). In the DCO clock domain (280 MHz, 28 x the sample rate)
// a 28-bit shift register is loaded with {adc_a, adc_b} on the cycle marked by
// load and shifts left on every other cycle, so sdata carries adc_a MSB first and
// then adc_b MSB first, one bit per DCO cycle. sframe is high while sdata carries
// the first bit of a word.
//
// Serializing two 14-bit ADC words at 28 times the sample rate with the PLL
// output follows the design description. The bit order, the frame marker, and
// loading on the divider's mid-frame strobe (the falling edge of the feedback
// clock, half a reference period after the words were sampled, so they are
// stable) are this design's choices.
module serializer #(
  parameter int unsigned ADC_W = 14
) (
  input  logic               ref_clk,
  input  logic               dco_clk,
  input  logic               rst_n,
  input  logic [ADC_W-1:0]   adc_a,
  input  logic [ADC_W-1:0]   adc_b,
  input  logic               load,        // one DCO cycle per frame
  output logic               sdata,
  output logic               sframe
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned SW = 2 * ADC_W;

  logic [SW-1:0] word_q;     // reference-domain capture
  logic [SW-1:0] shreg;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) word_q <= '0;
    else        word_q <= {adc_a, adc_b};
  end

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      sframe <= 1'b0;
    end else begin
      sframe <= load;
      if (load) shreg <= word_q;
      else      shreg <= {shreg[SW-2:0], 1'b0};
    end
  end

  assign sdata = shreg[SW-1];
endmodule
