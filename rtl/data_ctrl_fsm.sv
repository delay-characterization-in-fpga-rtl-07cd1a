// data_ctrl_fsm: the data control state machine between the UART and the
// ring oscillator control state machine.
//
// In Wait it takes one command byte from the receiver:
//   0 Reset          instruction := RESET, stay in Wait
//   1 Start          instruction := START, go to Start Measurement
//   2 Set Timer      the next two bytes (high byte first) are the
//                    measurement time in reference cycles
//   3 Set Test Case  the next byte is the test case (5 bits used)
//   4 Set RO Select  the next byte is the ring oscillator row
//   5 Send Result    go to Send Results
//   other            ignored, stay in Wait
// Start Measurement waits for wr from the measurement controller and then
// sends the results. Send Results transmits, each high byte first, the
// 16-bit count of every column (column 0 first) and then the temperature
// code, and returns to Wait. Sending from Wait re-sends the held results.
//
// Interface: clk, rst_n (synchronous, active low). From the receiver
// rx_data and rda; read acknowledges a byte in the cycle it is taken. To the
// transmitter tx_data and a one-cycle write, issued while tbe is 1.
// instr, set_time, test_case and ro_sel are registers that drive the rest
// of the system; counts and temp are the values sent.
//
// The six states, the command table, the register widths and the
// Start-to-Send flow follow the document. The byte order, the send order,
// the temperature as a 16-bit word and the reset value of the measurement
// time (3000 cycles, the length the document settles on) are this design's
// choices.
module data_ctrl_fsm #(
  parameter int unsigned COLS    = 5,
  parameter int unsigned CNT_W   = 16,
  parameter int unsigned TEMP_W  = 10,
  parameter int unsigned TIMER_W = dc_pkg::TIMER_W,
  parameter logic [dc_pkg::TIMER_W-1:0] SET_TIME_RESET = 16'd3000
) (
  input  logic               clk,
  input  logic               rst_n,
  // UART receiver
  input  logic [7:0]         rx_data,
  input  logic               rda,
  output logic               read,
  // UART transmitter
  output logic [7:0]         tx_data,
  output logic               write,
  input  logic               tbe,
  // ring oscillator control
  input  logic               wr,
  output dc_pkg::instr_e     instr,
  output logic [TIMER_W-1:0] set_time,
  output logic [7:0]         test_case,
  output logic [7:0]         ro_sel,
  // results
  input  logic [CNT_W-1:0]   counts [COLS],
  input  logic [TEMP_W-1:0]  temp
);
  timeunit 1ns; timeprecision 1ps;
  import dc_pkg::*;

  localparam int unsigned CNT_BYTES = (CNT_W + 7) / 8;
  localparam int unsigned NBYTES    = COLS * CNT_BYTES + 2;
  localparam int unsigned IW        = $clog2(NBYTES + 1);

  typedef enum logic [2:0] {
    D_WAIT, D_START_MEAS, D_SET_TIME, D_SET_TC, D_SET_ROSEL, D_SEND
  } dstate_e;

  dstate_e       state;
  logic          byte_idx;  // Set Timer: 0 = high byte next, 1 = low byte
  logic [IW-1:0] send_idx;
  logic          write_q;

  // Byte send_idx of the result message.
  function automatic logic [7:0] result_byte(logic [IW-1:0] idx,
                                             logic [CNT_W-1:0] cnt [COLS],
                                             logic [TEMP_W-1:0] t);
    logic [8*CNT_BYTES-1:0] word;
    logic [15:0]            tword;
    result_byte = '0;
    for (int unsigned c = 0; c < COLS; c++) begin
      word = (8*CNT_BYTES)'(cnt[c]);
      for (int unsigned b = 0; b < CNT_BYTES; b++)
        if (idx == IW'(c * CNT_BYTES + b))
          result_byte = word[8*(CNT_BYTES-1-b) +: 8];
    end
    tword = 16'(t);
    if (idx == IW'(NBYTES - 2)) result_byte = tword[15:8];
    if (idx == IW'(NBYTES - 1)) result_byte = tword[7:0];
  endfunction

  always_comb begin
    read = 1'b0;
    unique case (state)
      D_WAIT, D_SET_TIME, D_SET_TC, D_SET_ROSEL: read = rda;
      default:                                   read = 1'b0;
    endcase
  end

  assign write   = (state == D_SEND) && tbe && !write_q;
  assign tx_data = result_byte(send_idx, counts, temp);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= D_WAIT;
      instr     <= INSTR_NONE;
      set_time  <= SET_TIME_RESET;
      test_case <= '0;
      ro_sel    <= '0;
      byte_idx  <= 1'b0;
      send_idx  <= '0;
      write_q   <= 1'b0;
    end else begin
      write_q <= write;
      unique case (state)
        D_WAIT: begin
          send_idx <= '0;
          byte_idx <= 1'b0;
          if (rda) begin
            unique case (rx_data)
              CMD_RESET:     instr <= INSTR_RESET;
              CMD_START:     begin instr <= INSTR_START; state <= D_START_MEAS; end
              CMD_SET_TIMER: state <= D_SET_TIME;
              CMD_SET_TC:    state <= D_SET_TC;
              CMD_SET_ROSEL: state <= D_SET_ROSEL;
              CMD_SEND:      state <= D_SEND;
              default:       ;
            endcase
          end
        end
        D_START_MEAS: if (wr) state <= D_SEND;
        D_SET_TIME: begin
          if (rda) begin
            if (!byte_idx) begin
              set_time[15:8] <= rx_data;
              byte_idx       <= 1'b1;
            end else begin
              set_time[7:0] <= rx_data;
              state         <= D_WAIT;
            end
          end
        end
        D_SET_TC:    if (rda) begin test_case <= rx_data; state <= D_WAIT; end
        D_SET_ROSEL: if (rda) begin ro_sel    <= rx_data; state <= D_WAIT; end
        D_SEND: begin
          if (write) begin
            if (send_idx == IW'(NBYTES - 1)) state <= D_WAIT;
            else                             send_idx <= send_idx + 1'b1;
          end
        end
        default: state <= D_WAIT;
      endcase
    end
  end

  // Handshake rules: a byte is only taken when one is available, a write is
  // only issued to an idle transmitter, and never in two cycles in a row.
  a_read_needs_rda:   assert property (@(posedge clk) disable iff (!rst_n) read |-> rda);
  a_write_needs_tbe:  assert property (@(posedge clk) disable iff (!rst_n) write |-> tbe);
  a_no_double_write:  assert property (@(posedge clk) disable iff (!rst_n) write |=> !write);
endmodule
