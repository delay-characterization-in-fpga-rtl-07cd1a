// ro_array: behavioural model of the container under test, a ROWS x COLS
// array of identical CLB ring oscillators. Simulation model: the real array
// is built from hand-routed hard macros, each with a proxy CLB beside it.
//
// Row r is enabled by row_en[r]; all oscillators share the 5-bit test case
// and the configuration's loop pin. ro_out[r][c] is the proxy-decoupled
// output of the oscillator in row r, column c. A measured array covers only
// every other CLB column, because each oscillator needs the neighbouring
// CLB as its proxy.
//
// The 20 x 5 default (20 rows, 5 oscillators plus 5 proxies per row, i.e.
// a 20 x 10 CLB area) is the array size the document measures. The per-CLB
// delay offsets are this model's own: with VARIATION set every CLB gets a
// fixed pseudo-random 0..160 ps offset, and the CLB at (AGED_ROW, AGED_COL)
// gets AGED_PS more, standing in for an aged element.
module ro_array #(
  parameter int unsigned ROWS      = 20,
  parameter int unsigned COLS      = 5,
  parameter int unsigned LOOP_PIN  = 6,
  parameter bit          VARIATION = 1'b1,
  parameter int unsigned AGED_ROW  = 0,
  parameter int unsigned AGED_COL  = 0,
  parameter int unsigned AGED_PS   = 0
) (
  input  logic [ROWS-1:0] row_en,
  input  logic [4:0]      test_case,
  output logic [COLS-1:0] ro_out [ROWS]
);
  timeunit 1ns; timeprecision 1ps;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned EXTRA =
        (VARIATION ? dc_pkg::clb_variation_ps(r, c) : 0) +
        ((r == AGED_ROW && c == AGED_COL) ? AGED_PS : 0);
      ro_clb #(
        .LOOP_PIN       (LOOP_PIN),
        .EXTRA_DELAY_PS (EXTRA)
      ) u_ro (
        .en        (row_en[r]),
        .test_case (test_case),
        .ro_out    (ro_out[r][c])
      );
    end
  end
endmodule
