// freq_divider: divides a fast clock by 2 and by 4 with two toggle
// flip-flops, so an oscilloscope of limited bandwidth can measure the
// ring oscillator through an I/O pin.
//
// Interface: clk_in (the oscillator), rst (asynchronous, active high),
// div2 and div4 (square waves at 1/2 and 1/4 of the input frequency). The
// 1/2 and 1/4 outputs follow the document; the ripple structure is this
// design's choice.
module freq_divider (
  input  logic clk_in,
  input  logic rst,
  output logic div2,
  output logic div4
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) div2 <= 1'b0;
    else     div2 <= ~div2;
  end

  always_ff @(posedge div2 or posedge rst) begin
    if (rst) div4 <= 1'b0;
    else     div4 <= ~div4;
  end
endmodule
