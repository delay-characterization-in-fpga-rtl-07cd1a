// lut6: six-input lookup table, a 64:1 multiplexer over its truth table.
//
// In silicon it is a tree of 2:1 multiplexers with the 64 truth-table bits
// (INIT) at the leaves; input a[0]
// (pin A1) drives the first rank of multiplexers next to the table bits and
// a[5] (pin A6) the last one, so output o = INIT[a]. Every path from a table
// bit to the output goes through six multiplexers, one per input pin, which
// is why a delay measurement has to toggle each pin in turn to exercise all
// of them.
//
// Interface: a[5:0] are the pins A1..A6, o is the O6 output. Purely
// combinational. The default INIT is the 6-input XOR used by the ring
// oscillator, as in the document; the pin-to-rank order of the tree is this
// design's own choice.
module lut6 #(
  parameter logic [63:0] INIT = dc_pkg::LUT_INIT_XOR6
) (
  input  logic [5:0] a,
  output logic       o
);
  timeunit 1ns; timeprecision 1ps;

  // The indexed select is the 64:1 multiplexer tree: a[0] picks between
  // neighbouring table bits, a[5] between the two halves of the table.
  assign o = INIT[a];
endmodule
