// uart_rx: RS-232 receiver, 8 data bits (LSB first), odd parity, one stop
// bit, no flow control.
//
// The line is synchronised with two flip-flops. A falling edge starts a
// frame; the start bit is checked again half a bit later, then every bit is
// sampled in the middle of its bit time. A byte whose parity and stop bit
// are right is stored in the read register and rda (Read Data Available)
// rises. Until the data controller acknowledges with read, the byte is kept
// and the receiver ignores the line: a frame that arrives meanwhile is lost.
// A frame with a bad parity or stop bit is dropped and err pulses for one
// cycle.
//
// Interface: clk, rst_n (synchronous, active low), rx (serial line, idle
// high), data, rda, read (one-cycle acknowledge), err. Bit time is
// CLK_HZ / BAUD clock cycles. The 9600 baud, odd parity, no flow control
// and the hold-until-read behaviour follow the document; the frame timing
// details and the error pulse are this design's choices.
module uart_rx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       rda,
  input  logic       read,
  output logic       err
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned BIT_CYCLES = CLK_HZ / BAUD;
  localparam int unsigned CW         = $clog2(BIT_CYCLES + 1);

  typedef enum logic [2:0] {R_IDLE, R_START, R_DATA, R_PARITY, R_STOP} rstate_e;

  rstate_e         state;
  logic [1:0]      sync;
  logic [CW-1:0]   tick;
  logic [2:0]      bitn;
  logic [7:0]      shift;
  logic            par_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rx};
  end

  always_ff @(posedge clk) begin
    err <= 1'b0;
    if (!rst_n) begin
      state  <= R_IDLE;
      tick   <= '0;
      bitn   <= '0;
      shift  <= '0;
      par_ok <= 1'b0;
      data   <= '0;
      rda    <= 1'b0;
    end else begin
      if (read) rda <= 1'b0;
      unique case (state)
        R_IDLE: begin
          if (!sync[1] && !rda) begin
            state <= R_START;
            tick  <= CW'(BIT_CYCLES / 2);
          end
        end
        R_START: begin
          if (tick != '0) tick <= tick - 1'b1;
          else if (sync[1]) state <= R_IDLE;  // glitch, not a start bit
          else begin
            state <= R_DATA;
            tick  <= CW'(BIT_CYCLES - 1);
            bitn  <= '0;
          end
        end
        R_DATA: begin
          if (tick != '0) tick <= tick - 1'b1;
          else begin
            shift <= {sync[1], shift[7:1]};
            tick  <= CW'(BIT_CYCLES - 1);
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_PARITY;
          end
        end
        R_PARITY: begin
          if (tick != '0) tick <= tick - 1'b1;
          else begin
            par_ok <= ((^shift) ^ sync[1]) == 1'b1;  // odd number of ones
            tick   <= CW'(BIT_CYCLES - 1);
            state  <= R_STOP;
          end
        end
        R_STOP: begin
          if (tick != '0) tick <= tick - 1'b1;
          else begin
            state <= R_IDLE;
            if (sync[1] && par_ok) begin
              data <= shift;
              rda  <= 1'b1;
            end else begin
              err <= 1'b1;
            end
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
