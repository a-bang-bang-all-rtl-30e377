// lock_detect: decides which of the two loops controls the DCO.
//
// Every reference period the frequency error from the frequency detector (in
// units of the reference frequency) is compared with a window of +-TOL. After
// N_IN consecutive in-window measurements locked rises, which freezes the
// frequency loop and releases the phase loop; after N_OUT consecutive
// out-of-window measurements locked falls again and the frequency loop takes
// over (e.g. after a step of the reference frequency). Measurements are ignored
// until the detector reports valid. Clocked by the reference clock; init is a
// synchronous initialisation that clears locked.
//
// Disabling the frequency loop when the output is within about +-10 MHz of the
// target (TOL = 1 count of a 10 MHz reference) follows the design description.
// The consecutive-measurement filter and its lengths are this design's choice; it
// keeps the +-1 count quantization of the frequency detector from toggling loops.
module lock_detect
  import adpll_pkg::*;
#(
  parameter int unsigned TOL   = 1,
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4
) (
  input  logic                     ref_clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic signed [FERR_W-1:0] ferr,
  input  logic                     valid,
  output logic                     locked
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned RUN_W = $clog2((N_IN > N_OUT ? N_IN : N_OUT) + 1);

  logic             in_win;
  logic [RUN_W-1:0] run;       // length of the current run that disagrees with locked

  assign in_win = (ferr <= $signed(FERR_W'(TOL))) && (ferr >= -$signed(FERR_W'(TOL)));

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      run    <= '0;
    end else if (init) begin
      locked <= 1'b0;
      run    <= '0;
    end else if (valid) begin
      if (in_win != locked) begin
        if (locked ? (run == RUN_W'(N_OUT - 1)) : (run == RUN_W'(N_IN - 1))) begin
          locked <= in_win;
          run    <= '0;
        end else begin
          run <= run + 1'b1;
        end
      end else begin
        run <= '0;
      end
    end
  end
endmodule
