// case_study_top: the single ring oscillator prototype that preceded the
// CLB array. A STAGES-stage ring oscillator is measured twice: inside, by
// an 8-bit counter gated by a 100-cycle timer (shown on eight LEDs), and
// outside, through the expansion I/O pins, directly and divided by 2 and 4
// for an oscilloscope. The dividers are held in reset while the
// oscillator is off.
//
// Interface: clk (100 MHz reference), rst_n (synchronous, active low),
// start (push button), leds (count, MSB first on the board: 8'b01001100 =
// 76 MHz), ro_out, ro_div2, ro_div4 (to the I/O pins), done. The
// oscillator is a behavioural model; the rest is synthesizable.
module case_study_top #(
  parameter int unsigned STAGES         = 31,
  parameter int unsigned STAGE_DELAY_PS = 210,
  parameter int unsigned MEAS_CYCLES    = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic [7:0] leds,
  output logic       ro_out,
  output logic       ro_div2,
  output logic       ro_div4,
  output logic       done
);
  timeunit 1ns; timeprecision 1ps;

  logic ro_en;

  cs_ring_oscillator #(.STAGES(STAGES), .STAGE_DELAY_PS(STAGE_DELAY_PS)) u_ro (
    .en(ro_en), .ro_out(ro_out)
  );

  cs_measure #(.MEAS_CYCLES(MEAS_CYCLES), .CNT_W(8)) u_meas (
    .clk, .rst_n, .start, .osc(ro_out), .ro_en, .count(leds), .done
  );

  freq_divider u_div (
    .clk_in(ro_out), .rst(!ro_en), .div2(ro_div2), .div4(ro_div4)
  );
endmodule
