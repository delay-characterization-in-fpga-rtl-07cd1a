// osc_counter: counts the periods of one ring oscillator.
//
// The counter is clocked by the oscillator output itself and adds one on
// each rising edge while en is 1. rst clears it asynchronously, since the
// oscillator, which is its clock, is stopped while the controller resets
// it. en comes from the reference-clock domain and changes only at the
// start and end of the measurement window, so the count can be off by one
// period at each end.
//
// Interface: osc (oscillator, used as clock), rst (asynchronous, active
// high), en, count. Counting oscillations during a window set by the timer
// follows the document; the 16-bit width is this design's choice, matching
// the document's example of a 300 MHz oscillator measured for 20000
// reference cycles without overflow. The count wraps on overflow.
//
// The count register also has a power-up value of 0, as FPGA configuration
// gives it: rst can be high without a break from power-up until the first
// measurement, and then never presents a rising edge.
module osc_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             osc,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  timeunit 1ns; timeprecision 1ps;

  logic [WIDTH-1:0] count_q = '0;  // power-up value

  assign count = count_q;

  always_ff @(posedge osc or posedge rst) begin
    if (rst)     count_q <= '0;
    else if (en) count_q <= count_q + 1'b1;
  end
endmodule
