// fine_dac_decoder: segmentation logic of the 10-bit fine DAC.
//
// The 4 least significant bits drive binary-weighted current sources directly.
// The 6 most significant bits drive 63 equal unit sources (16 LSBs each) laid out
// as an 8 x 8 array (one position unused), addressed by a row decoder (bits 9:7)
// and a column decoder (bits 6:4). Cell (r, c) is on when its row is below the
// selected row, or when it is in the selected row and its column is below the
// selected column. So exactly code[9:4] cells are on and raising the code only
// ever switches cells on, which keeps the DAC monotonic. Purely combinational.
//
// Splitting the fine word into 4 binary LSBs and a 6-bit thermometer array with
// row and column decoders follows the design description. The cell order (row
// by row, low index first) is this design's choice; the analog delay cells that
// align the LSB lines with the decoder delay are not modelled.
module fine_dac_decoder
  import adpll_pkg::*;
(
  input  logic [FINE_W-1:0]     code,
  output logic [FINE_BIN_W-1:0] bin,      // binary LSB switches
  output logic [N_UNARY-1:0]    unary     // unit cell switches, cell r*8+c
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned RW = FINE_UNA_W / 2;        // row address bits
  localparam int unsigned CW = FINE_UNA_W - RW;       // column address bits
  localparam int unsigned NR = 1 << RW;
  localparam int unsigned NC = 1 << CW;

  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic [NR-1:0] row_below;   // row decoder: rows fully on
  logic [NR-1:0] row_sel;     // row decoder: the partially filled row
  logic [NC-1:0] col_below;   // column decoder: thermometer of the column address

  assign bin = code[FINE_BIN_W-1:0];
  assign row = code[FINE_W-1 -: RW];
  assign col = code[FINE_BIN_W +: CW];

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      row_below[r] = (row > RW'(r));
      row_sel[r]   = (row == RW'(r));
    end
    for (int c = 0; c < NC; c++) col_below[c] = (col > CW'(c));
  end

  always_comb begin
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++)
        if (r * NC + c < N_UNARY)
          unary[r*NC + c] = row_below[r] | (row_sel[r] & col_below[c]);
  end
endmodule
