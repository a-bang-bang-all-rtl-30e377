// adpll_top: bang-bang all-digital PLL synthesizing 28 x a 10 MHz reference
// (280 MHz), with the serializer it clocks.
//
// Two loops share one digitally controlled oscillator (DCO = current DAC +
// current-controlled ring oscillator), and only one is active at a time:
//  * Frequency loop (FLL): the frequency detector counts DCO periods per
//    reference period; FCW - count is accumulated into the 6-bit coarse word.
//  * Phase loop (PLL): a one-flip-flop bang-bang detector compares the
//    reference with the DCO clock divided by 28; a KP/KI loop filter moves the
//    10-bit fine word.
// After reset the coarse word starts at mid-scale and the FLL runs while the fine
// word is held at half scale. When the frequency error stays within +-1 count
// (about +-10 MHz) the lock detector freezes the coarse word and hands control
// to the PLL, which pulls in phase and then tracks with a small bang-bang limit
// cycle. If the error leaves the window again (a reference frequency step) the
// FLL takes over once more, with the fine word back at half scale.
//
// Clocks: ref_clk (10 MHz) runs the detector, lock logic, coarse accumulator and
// the ADC word capture; the loop filter runs on the inverted reference clock;
// the DCO output clk_out runs the divider, frequency counter and serializer.
// rst_n is asynchronous and active low; it is synchronized into both domains,
// and the reference-domain copy is the INIT signal of the controllers.
//
// The loop structure, word widths, divide ratio, gains and init values follow
// the design description. The DCO is a behavioural model, so this top is meant
// for simulation; everything else is synthesizable logic.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned KP        = KP_DEF,
  parameter int unsigned KI        = KI_DEF,
  parameter int unsigned DIV_RESET = DIV_M,           // divide ratio 2*(DIV_RESET+1)
  parameter int unsigned LOCK_TOL  = 1,
  parameter int unsigned LOCK_N    = 4,
  parameter int unsigned F0_KHZ    = 72000                // DCO model offset
) (
  input  logic                  ref_clk,
  input  logic                  rst_n,
  input  logic [1:0]            pedestal,    // DCO centre trim: 2'b00, 2'b01, 2'b11
  input  logic [13:0]           adc_a,
  input  logic [13:0]           adc_b,
  output logic                  clk_out,     // synthesized clock
  output logic                  clk_out_n,
  output logic                  fb_clk,      // clk_out / 28
  output logic                  sdata,       // serial data, 28 bits per reference period
  output logic                  sframe,      // first bit of a serial word
  output logic [COARSE_W-1:0]   coarse,
  output logic [FINE_W-1:0]     fine,
  output logic [CNT_W-1:0]      dco_count,   // DCO periods in last reference period
  output logic                  fll_active,
  output logic                  locked,
  output logic                  early        // bang-bang detector output
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned FCW = 2 * (DIV_RESET + 1);

  // ---------------- resets ----------------
  logic [1:0] ref_rst_q, dco_rst_q;
  logic       init, dco_rst_n;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) ref_rst_q <= '0;
    else        ref_rst_q <= {ref_rst_q[0], 1'b1};
  end
  assign init = ~ref_rst_q[1];

  always_ff @(posedge clk_out or negedge rst_n) begin
    if (!rst_n) dco_rst_q <= '0;
    else        dco_rst_q <= {dco_rst_q[0], 1'b1};
  end
  assign dco_rst_n = dco_rst_q[1];

  // ---------------- DCO ----------------
  logic [FINE_BIN_W-1:0] fine_bin;
  logic [N_UNARY-1:0]    fine_unary;
  logic [15:0]           i_units;

  fine_dac_decoder u_dec (
    .code  (fine),
    .bin   (fine_bin),
    .unary (fine_unary)
  );

  current_dac_model u_dac (
    .coarse     (coarse),
    .fine_bin   (fine_bin),
    .fine_unary (fine_unary),
    .pedestal   (pedestal),
    .i_units    (i_units)
  );

  ico_model #(.F0_MHZ(real'(F0_KHZ) / 1000.0)) u_ico (
    .enable  (1'b1),
    .i_units (i_units),
    .out_p   (clk_out),
    .out_n   (clk_out_n)
  );

  // ---------------- feedback divider ----------------
  logic       frame;
  logic [3:0] div_count;

  freq_divider #(.CNT_W(4), .M(DIV_RESET)) u_div (
    .dco_clk (clk_out),
    .rst_n   (dco_rst_n),
    .fb_clk  (fb_clk),
    .count   (div_count),
    .frame   (frame)
  );

  // ---------------- phase loop ----------------
  logic [FINE_W-1:0] integ;

  bbpd u_bbpd (
    .ref_clk (ref_clk),
    .rst_n   (rst_n),
    .fb_clk  (fb_clk),
    .early   (early)
  );

  phase_controller #(.KP(KP), .KI(KI), .D_INIT(FINE_INIT)) u_pc (
    .clk     (~ref_clk),
    .rst_n   (rst_n),
    .init_en (fll_active),
    .early   (early),
    .integ   (integ),
    .d_fine  (fine)
  );

  // ---------------- frequency loop ----------------
  logic signed [FERR_W-1:0] ferr;
  logic                     fvalid;

  freq_detector #(.FCW(FCW)) u_fd (
    .dco_clk (clk_out),
    .rst_n   (dco_rst_n),
    .ref_clk (ref_clk),
    .count   (dco_count),
    .ferr    (ferr),
    .valid   (fvalid)
  );

  lock_detect #(.TOL(LOCK_TOL), .N_IN(LOCK_N), .N_OUT(LOCK_N)) u_ld (
    .ref_clk (ref_clk),
    .rst_n   (rst_n),
    .init    (init),
    .ferr    (ferr),
    .valid   (fvalid),
    .locked  (locked)
  );

  assign fll_active = ~locked;

  freq_controller u_fc (
    .ref_clk (ref_clk),
    .rst_n   (rst_n),
    .init    (init),
    .enable  (fll_active),
    .valid   (fvalid),
    .ferr    (ferr),
    .coarse  (coarse)
  );

  // ---------------- serializer ----------------
  serializer #(.ADC_W(14)) u_ser (
    .ref_clk (ref_clk),
    .dco_clk (clk_out),
    .rst_n   (dco_rst_n),
    .adc_a   (adc_a),
    .adc_b   (adc_b),
    .load    (frame),
    .sdata   (sdata),
    .sframe  (sframe)
  );
endmodule
