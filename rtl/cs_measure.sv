// cs_measure: control, timer and counter of the single ring oscillator
// prototype.
//
// After reset the oscillator is off and the counter cleared. A press of
// start (held or pulsed) enables the oscillator, the timer and the counter
// together; after MEAS_CYCLES reference cycles the timer disables the
// counter, which keeps its value for display, while the oscillator keeps
// running until the next reset. With the default 100 cycles of a 100 MHz
// clock the count is the oscillator frequency in MHz, modulo 256.
//
// Interface: clk (reference clock), rst_n (synchronous, active low), start, osc (oscillator output, used
// as the counter's clock), ro_en (oscillator enable), count (8 bits, to the
// LEDs), done. The 100-cycle window, the 8-bit count and the behaviour
// after the window follow the document; the state encoding is this
// design's choice.
module cs_measure #(
  parameter int unsigned MEAS_CYCLES = 100,
  parameter int unsigned CNT_W       = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             osc,
  output logic             ro_en,
  output logic [CNT_W-1:0] count,
  output logic             done
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_HOLD} cstate_e;

  localparam int unsigned TW = $clog2(MEAS_CYCLES + 1);

  cstate_e       state;
  logic [TW-1:0] timer;
  logic          cnt_en;
  logic          cnt_clr;  // clears the counter asynchronously, since the
                           // oscillator clocking it is stopped. It toggles
                           // while rst_n is low, so the counter sees a
                           // rising edge whatever its power-up state. Only
                           // reset leads back to idle.

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= C_IDLE;
      timer <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (start) state <= C_RUN;
        C_RUN: begin
          timer <= timer + 1'b1;
          if (timer == TW'(MEAS_CYCLES - 1)) state <= C_HOLD;
        end
        C_HOLD: ;
        default: state <= C_IDLE;
      endcase
    end
  end

  assign ro_en  = (state != C_IDLE);
  assign cnt_en = (state == C_RUN);
  assign done   = (state == C_HOLD);

  always_ff @(posedge clk) cnt_clr <= !rst_n && !cnt_clr;

  always_ff @(posedge osc or posedge cnt_clr) begin
    if (cnt_clr)     count <= '0;
    else if (cnt_en) count <= count + 1'b1;
  end
endmodule
