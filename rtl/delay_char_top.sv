// delay_char_top: ring-oscillator array that measures the delay of every
// CLB in a reconfigurable region, with its measurement control and a serial
// link to the workstation.
//
// A workstation sends one-byte commands over RS-232 (9600 baud, odd
// parity). The data controller keeps the measurement time, the 5-bit test
// case and the selected row, and hands START/RESET to the measurement
// controller. One measurement: the selected row of ring oscillators runs
// for a 2^12-cycle pre-run, then the reference timer opens a window of
// set_time reference cycles in which one counter per column counts the
// periods of the oscillator of that column in the selected row. The
// results (COLS 16-bit counts and the temperature code) go back over the
// serial line. The oscillator frequency is count / set_time * f_ref.
//
// Interface: clk is the 100 MHz reference clock, rst_n a synchronous
// active-low reset, uart_rx/uart_tx the serial line, temp the System
// Monitor temperature code (0.49 C per LSB), which comes from a vendor
// block outside this design. The ring oscillator array is a behavioural
// model; everything else is synthesizable. The parameters give the clock
// and baud rate, the array size (20 rows x 5 columns by default, the
// document's array), the loop pin of the configuration (6 by default) and
// the model-only delay offsets of ro_array.
//
// Beside it, with its own ports, stands the single ring oscillator
// prototype that came first: a 31-stage and a 63-stage oscillator
// (case_study_top), both started by the cs_start button, each with an
// 8-bit count on eight LEDs (cs_leds, frequency in MHz) and its output
// undivided and divided by 2 and 4 on I/O pins. It shares only clk and
// rst_n with the array system.
//
// Tool notes: the combinational loops a synthesis tool reports are the
// ring oscillators themselves. The control word is used both as
// synchronous controls (timer) and as an asynchronous reset (counters,
// whose clocks are the oscillators), as the counting scheme requires.
module delay_char_top #(
  parameter int unsigned CLK_HZ         = 100_000_000,
  parameter int unsigned BAUD           = 9600,
  parameter int unsigned ROWS           = 20,
  parameter int unsigned COLS           = 5,
  parameter int unsigned LOOP_PIN       = 6,
  parameter int unsigned PRE_RUN_CYCLES = dc_pkg::PRE_RUN_CYCLES,
  parameter int unsigned CNT_W          = 16,
  parameter int unsigned TEMP_W         = 10,
  parameter bit          VARIATION      = 1'b1,
  parameter int unsigned AGED_ROW       = 0,
  parameter int unsigned AGED_COL       = 0,
  parameter int unsigned AGED_PS        = 0,
  parameter int unsigned CS_STAGE_DELAY_PS = 210,
  parameter int unsigned CS_MEAS_CYCLES    = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              uart_rx,
  output logic              uart_tx,
  input  logic [TEMP_W-1:0] temp,
  // single ring oscillator prototype: index 0 = 31 stages, 1 = 63 stages
  input  logic              cs_start,
  output logic [7:0]        cs_leds [2],
  output logic [1:0]        cs_ro,
  output logic [1:0]        cs_div2,
  output logic [1:0]        cs_div4,
  output logic [1:0]        cs_done
);
  timeunit 1ns; timeprecision 1ps;
  import dc_pkg::*;

  // UART <-> data controller
  logic [7:0] rx_data, tx_data;
  logic       rda, read, write, tbe, rx_err;

  // data controller <-> measurement controller
  instr_e               instr;
  logic [TIMER_W-1:0]   set_time, timer_count;
  logic [7:0]           test_case, ro_sel;
  ro_ctrl_t             ctrl;

  // array, wrapper and counters
  logic [COLS-1:0]      ro_out [ROWS];
  logic [ROWS-1:0]      row_en;
  logic [COLS-1:0]      col_osc;
  logic [CNT_W-1:0]     counts [COLS];

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rx(uart_rx), .data(rx_data), .rda, .read, .err(rx_err)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n, .data(tx_data), .write, .tbe, .tx(uart_tx)
  );

  data_ctrl_fsm #(.COLS(COLS), .CNT_W(CNT_W), .TEMP_W(TEMP_W)) u_data (
    .clk, .rst_n, .rx_data, .rda, .read, .tx_data, .write, .tbe,
    .wr(ctrl.wr), .instr, .set_time, .test_case, .ro_sel, .counts, .temp
  );

  ro_ctrl_fsm #(.PRE_RUN_CYCLES(PRE_RUN_CYCLES)) u_ctrl (
    .clk, .rst_n, .instr, .timer_count, .set_time, .ctrl
  );

  ref_timer u_timer (
    .clk, .rst(ctrl.rst_t), .en(ctrl.en_t), .count(timer_count)
  );

  selection_wrapper #(.ROWS(ROWS), .COLS(COLS)) u_sel (
    .en_r(ctrl.en_r), .ro_sel, .ro_out, .row_en, .col_osc
  );

  ro_array #(
    .ROWS(ROWS), .COLS(COLS), .LOOP_PIN(LOOP_PIN), .VARIATION(VARIATION),
    .AGED_ROW(AGED_ROW), .AGED_COL(AGED_COL), .AGED_PS(AGED_PS)
  ) u_array (
    .row_en, .test_case(test_case[4:0]), .ro_out
  );

  for (genvar c = 0; c < COLS; c++) begin : g_cnt
    osc_counter #(.WIDTH(CNT_W)) u_cnt (
      .osc(col_osc[c]), .rst(ctrl.rst_c), .en(ctrl.en_c), .count(counts[c])
    );
  end

  for (genvar p = 0; p < 2; p++) begin : g_cs
    case_study_top #(
      .STAGES(p == 0 ? 31 : 63), .STAGE_DELAY_PS(CS_STAGE_DELAY_PS),
      .MEAS_CYCLES(CS_MEAS_CYCLES)
    ) u_cs (
      .clk, .rst_n, .start(cs_start), .leds(cs_leds[p]), .ro_out(cs_ro[p]),
      .ro_div2(cs_div2[p]), .ro_div4(cs_div4[p]), .done(cs_done[p])
    );
  end

  // The serial protocol has no error report, and the test case register
  // is a full byte of which the array uses five bits.
  logic unused;
  assign unused = rx_err ^ (^test_case[7:5]);
endmodule
