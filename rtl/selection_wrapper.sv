// selection_wrapper: row enable decoder and column multiplexers between the
// ring oscillator array and the row of oscillation counters.
//
// The ring oscillators of row ro_sel are enabled while en_r is 1; every
// other row is held still. Each column has one counter, and its clock
// col_osc[c] is the output of the oscillator in column c of the selected
// row. A row number of ROWS or more enables nothing and selects 0.
//
// Interface: combinational, no clock. The decoder, the per-column
// multiplexers and one-row-at-a-time operation follow the document; the
// 8-bit row number (one received byte) and the out-of-range behaviour are
// this design's own choices.
module selection_wrapper #(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 5
) (
  input  logic            en_r,
  input  logic [7:0]      ro_sel,
  input  logic [COLS-1:0] ro_out [ROWS],
  output logic [ROWS-1:0] row_en,
  output logic [COLS-1:0] col_osc
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    row_en  = '0;
    col_osc = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (ro_sel == 8'(r)) begin
        row_en[r] = en_r;
        col_osc   = ro_out[r];
      end
    end
  end
endmodule
