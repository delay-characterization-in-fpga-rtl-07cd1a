// ref_timer: the reference counter that times the measurement.
//
// It counts cycles of the reference clock while en is 1 and returns to 0
// while rst is 1 (rst wins). The measurement controller compares the count
// with the pre-run length and with the measurement time set by the
// workstation.
//
// Interface: clk is the reference clock (100 MHz in the document); rst and
// en are synchronous; count is registered. The 16-bit width, and so a
// measurement of at most 65535 reference cycles, follow the document. The
// count wraps at 2^WIDTH; the controller never lets it get there.
module ref_timer #(
  parameter int unsigned WIDTH = dc_pkg::TIMER_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end
endmodule
