// freq_divider: feedback divider, DCO clock divided by 2*(M+1) = 28.
//
// A synchronous 4-bit counter built from JK flip-flops counts DCO clock edges.
// Stage 0 has J = K = 1 (always toggles); stage i > 0 toggles when all lower bits
// are 1 (an AND chain). Each stage i > 0 has "reset logic": when the
// count equals M (13 = Q0 & ~Q1 & Q2 & Q3) a multiplexer replaces its toggle input
// with J = 0, K = 1, so the next edge clears it. Stage 0 is 1 at count 13 and
// toggles to 0 on its own. The counter thus runs 0..13, 14 states. The falling edge
// of the MSB Q3 (the 13 -> 0 step) toggles a divide-by-two flip-flop whose output
// is the feedback clock fb_clk, giving f_dco / 28 with a 50 % duty cycle.
//
// The counter, its reset decode, the reset multiplexers and the divide-by-two
// follow the design description. Two choices are this design's own: the
// divide-by-two is clocked by the DCO clock and enabled on the 13 -> 0 step instead
// of being clocked by the falling edge of Q3 (same edge, one clock domain), and an
// asynchronous active-low reset starts the counter and fb_clk at 0. M is a
// parameter (default 13) because the text notes the reset count sets the ratio.
// frame is a one-cycle strobe on the DCO cycle before fb_clk falls, used by the
// serializer to load a new word.
module freq_divider #(
  parameter int unsigned CNT_W = 4,
  parameter int unsigned M     = 13     // reset count; divide ratio 2*(M+1)
) (
  input  logic             dco_clk,
  input  logic             rst_n,
  output logic             fb_clk,      // f_dco / (2*(M+1))
  output logic [CNT_W-1:0] count,       // counter state Q3..Q0
  output logic             frame        // 1 when the next edge drops fb_clk
);
  timeunit 1ns;
  timeprecision 1ps;

  logic             at_m;       // reset logic decode
  logic [CNT_W-1:0] j, k;       // JK inputs after the reset multiplexers
  logic [CNT_W-1:0] tgl;        // toggle condition before the reset multiplexers

  assign at_m = (count == CNT_W'(M));

  // toggle enables: the AND chain of the counter
  assign tgl[0] = 1'b1;
  for (genvar i = 1; i < CNT_W; i++) begin : g_tgl
    assign tgl[i] = tgl[i-1] & count[i-1];
  end

  always_comb begin
    j = tgl;
    k = tgl;
    for (int i = 1; i < CNT_W; i++) begin
      j[i] = at_m ? 1'b0 : tgl[i];
      k[i] = at_m ? 1'b1 : tgl[i];
    end
  end

  // JK flip-flops: Q+ = J & ~Q | ~K & Q
  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= (j & ~count) | (~k & count);
  end

  // divide-by-two on the falling edge of the MSB, i.e. on the M -> 0 step
  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n)    fb_clk <= 1'b0;
    else if (at_m) fb_clk <= ~fb_clk;
  end

  assign frame = at_m & fb_clk;
endmodule
