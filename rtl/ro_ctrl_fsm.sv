// ro_ctrl_fsm: the ring oscillator control state machine that sequences one
// measurement.
//
//   Idle        timer and counters held in reset, oscillators off; waits
//               for the START instruction.
//   Pre Run     oscillators and timer run for PRE_RUN_CYCLES reference
//               cycles so the oscillators settle to a steady frequency.
//   Timer Reset one cycle: timer cleared, oscillators keep running.
//   Measure     timer and counters run together for set_time reference
//               cycles.
//   Send Out    one cycle: everything stopped, wr = 1 tells the data
//               controller that results are ready.
//   Measure End everything stopped but not reset, so the counts can be read
//               (and read again); waits for the RESET instruction.
//
// Interface: clk is the reference clock, rst_n a synchronous active-low
// reset. instr is the level-held instruction from the data controller,
// timer_count the reference timer's count, set_time the measurement time in
// reference cycles (0 is treated as 1). ctrl carries rst_t, rst_c, en_t,
// en_c, en_r and wr, decoded from the state alone.
//
// States, outputs and transitions follow the document's state diagram,
// including the 2^12-cycle pre-run. Comparing the count one cycle early so
// that Pre Run and Measure last exactly PRE_RUN_CYCLES and set_time cycles
// is this design's choice.
module ro_ctrl_fsm #(
  parameter int unsigned PRE_RUN_CYCLES = dc_pkg::PRE_RUN_CYCLES,
  parameter int unsigned TIMER_W        = dc_pkg::TIMER_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  dc_pkg::instr_e     instr,
  input  logic [TIMER_W-1:0] timer_count,
  input  logic [TIMER_W-1:0] set_time,
  output dc_pkg::ro_ctrl_t   ctrl
);
  timeunit 1ns; timeprecision 1ps;
  import dc_pkg::*;

  typedef enum logic [2:0] {
    S_IDLE, S_PRE_RUN, S_TIMER_RESET, S_MEASURE, S_SEND_OUT, S_MEASURE_END
  } state_e;

  state_e state, state_n;

  localparam logic [TIMER_W-1:0] PRE_RUN_LAST = TIMER_W'(PRE_RUN_CYCLES - 1);
  logic [TIMER_W-1:0] meas_last;

  assign meas_last = (set_time == '0) ? '0 : set_time - 1'b1;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:        if (instr == INSTR_START)         state_n = S_PRE_RUN;
      S_PRE_RUN:     if (timer_count == PRE_RUN_LAST)  state_n = S_TIMER_RESET;
      S_TIMER_RESET:                                    state_n = S_MEASURE;
      S_MEASURE:     if (timer_count == meas_last)     state_n = S_SEND_OUT;
      S_SEND_OUT:                                       state_n = S_MEASURE_END;
      S_MEASURE_END: if (instr == INSTR_RESET)         state_n = S_IDLE;
      default:                                          state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_n;
  end

  //                       rst_t rst_c en_t  en_c  en_r  wr
  always_comb begin
    unique case (state)
      S_IDLE:        ctrl = '{1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0};
      S_PRE_RUN:     ctrl = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0};
      S_TIMER_RESET: ctrl = '{1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0};
      S_MEASURE:     ctrl = '{1'b0, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0};
      S_SEND_OUT:    ctrl = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};
      default:       ctrl = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0};
    endcase
  end

  // The counters must never run while the oscillators are off, nor be
  // reset while they count.
  a_en_c_needs_en_r: assert property (@(posedge clk) disable iff (!rst_n) ctrl.en_c |-> ctrl.en_r);
  a_no_rst_while_counting: assert property (@(posedge clk) disable iff (!rst_n) ctrl.en_c |-> !ctrl.rst_c);
endmodule
