// tb_ro_ctrl_fsm: checks the measurement sequence of the ring oscillator
// control state machine, driven with a cycle-accurate timer model.
//
// After START it checks, cycle by cycle, the control word of each state
// (Pre Run, Timer Reset, Measure, Send Out, Measure End) against the state
// table, that Pre Run lasts PRE cycles and Measure exactly set_time cycles,
// that wr is a single-cycle pulse, that the machine stays in Measure End
// until RESET (even with START still given) and that RESET returns it to
// Idle. Several measurement times are tried, including 1.
module tb_ro_ctrl_fsm;
  timeunit 1ns; timeprecision 1ps;
  import dc_pkg::*;

  localparam int PRE = 16;

  logic        clk = 1'b0, rst_n;
  instr_e      instr;
  logic [15:0] timer_count, set_time;
  ro_ctrl_t    ctrl;
  int          checks = 0, failures = 0;

  // rst_t rst_c en_t en_c en_r wr
  localparam ro_ctrl_t C_IDLE  = '{1, 1, 0, 0, 0, 0};
  localparam ro_ctrl_t C_PRE   = '{0, 0, 1, 0, 1, 0};
  localparam ro_ctrl_t C_TRST  = '{1, 0, 0, 0, 1, 0};
  localparam ro_ctrl_t C_MEAS  = '{0, 0, 1, 1, 1, 0};
  localparam ro_ctrl_t C_SEND  = '{0, 0, 0, 0, 0, 1};
  localparam ro_ctrl_t C_END   = '{0, 0, 0, 0, 0, 0};

  ro_ctrl_fsm #(.PRE_RUN_CYCLES(PRE)) u_dut (
    .clk, .rst_n, .instr, .timer_count, .set_time, .ctrl
  );

  // Timer model, driven by the control word under test.
  always_ff @(posedge clk)
    if (ctrl.rst_t)     timer_count <= '0;
    else if (ctrl.en_t) timer_count <= timer_count + 1'b1;

  always #5 clk = ~clk;

  task automatic expect_word(ro_ctrl_t exp, int cycles, string what);
    for (int i = 0; i < cycles; i++) begin
      checks++;
      if (ctrl !== exp) begin
        failures++;
        $display("FAIL %s cycle %0d: ctrl=%b expected %b", what, i, ctrl, exp);
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int times [3] = '{1, 7, 40};
    rst_n = 1'b0; instr = INSTR_NONE; set_time = 16'd7; timer_count = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    expect_word(C_IDLE, 5, "idle without start");
    foreach (times[k]) begin
      set_time = 16'(times[k]);
      instr = INSTR_START;
      expect_word(C_IDLE, 1, "idle sees start");
      expect_word(C_PRE, PRE, "pre run");
      expect_word(C_TRST, 1, "timer reset");
      expect_word(C_MEAS, times[k], "measure");
      expect_word(C_SEND, 1, "send out");
      expect_word(C_END, 10, "measure end, start held");
      instr = INSTR_NONE;
      expect_word(C_END, 3, "measure end, no instruction");
      instr = INSTR_RESET;
      expect_word(C_END, 1, "measure end sees reset");
      expect_word(C_IDLE, 3, "idle after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
