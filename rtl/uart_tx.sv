// uart_tx: RS-232 transmitter, 8 data bits (LSB first), odd parity,
// STOP_BITS stop bits, no flow control.
//
// A one-cycle write while tbe (Transmission Block End) is 1 loads data into
// the shift register; tbe drops on the next cycle and the frame goes out:
// start bit, eight data bits, the parity bit that makes the number of ones
// odd, then the stop bits. tbe rises again when the last stop bit has been
// sent, asking for the next byte. A write while tbe is 0 is ignored.
//
// Interface: clk, rst_n (synchronous, active low), data, write, tbe, tx
// (serial line, idle high). Bit time is CLK_HZ / BAUD clock cycles. The
// 9600 baud, odd parity and the tbe handshake follow the document; one stop
// bit by default is this design's choice.
module uart_tx #(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned BAUD      = 9600,
  parameter int unsigned STOP_BITS = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       write,
  output logic       tbe,
  output logic       tx
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned BIT_CYCLES = CLK_HZ / BAUD;
  localparam int unsigned CW         = $clog2(BIT_CYCLES + 1);
  localparam int unsigned NBITS      = 10 + STOP_BITS;  // start, 8 data, parity, stops

  logic [NBITS-1:0] frame;
  logic [CW-1:0]    tick;
  logic [3:0]       nleft;  // bits of the frame not yet started
  logic             busy;

  assign tbe = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame <= '1;
      tick  <= '0;
      nleft <= '0;
      busy  <= 1'b0;
      tx    <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (write) begin
        // Bit 0 of frame goes out first.
        frame <= {{STOP_BITS{1'b1}}, ~^data, data, 1'b0};
        nleft <= 4'(NBITS);
        tick  <= '0;
        busy  <= 1'b1;
      end
    end else if (tick != '0) begin
      tick <= tick - 1'b1;
    end else if (nleft == '0) begin
      busy <= 1'b0;  // last stop bit has had its full bit time
      tx   <= 1'b1;
    end else begin
      tx    <= frame[0];
      frame <= {1'b1, frame[NBITS-1:1]};
      nleft <= nleft - 1'b1;
      tick  <= CW'(BIT_CYCLES - 1);
    end
  end
endmodule
