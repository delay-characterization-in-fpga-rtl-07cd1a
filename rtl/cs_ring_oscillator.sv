// cs_ring_oscillator: behavioural model of the single long ring oscillator
// of the first prototype (31 or 63 stages), used to prove the measurement
// flow before the CLB array was built. Simulation model, not synthesizable
// logic: on the FPGA it is a placed chain of LUTs.
//
// The loop is one enable stage (NAND of the loop signal and en) followed by
// STAGES - 1 inverting LUTs, so it has an odd number of inversions and runs
// while en is 1; with en at 0 the first stage outputs 1 and the ring settles
// still. Each stage has the same delay, STAGE_DELAY_PS, lumped at the
// enable stage's output: the frequency is 1 / (2 x STAGES x STAGE_DELAY_PS).
//
// Interface: en, ro_out (output of the last inverter). The stage counts 31
// and 63 follow the document; the NAND enable stage and the default
// 210 ps per stage are this design's choices. 210 ps is derived from the
// 76.9 MHz measured for 31 stages and gives 37.8 MHz for 63 stages, close
// to the 38.4 MHz measured.
//
// A synthesis tool reports a combinational loop here: it is the oscillator.
module cs_ring_oscillator #(
  parameter int unsigned STAGES         = 31,
  parameter int unsigned STAGE_DELAY_PS = 210
) (
  input  logic en,
  output logic ro_out
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LOOP_PS = STAGES * STAGE_DELAY_PS;

  logic                  head_q;   // output of the enable stage
  logic [STAGES-1:0]     node;     // node[0] = head, node[i] = inverter i output
  logic                  head_next;

  assign node[0] = head_q;
  for (genvar i = 1; i < STAGES; i++) begin : g_inv
    assign node[i] = ~node[i-1];
  end

  assign head_next = ~(node[STAGES-1] & en);
  assign ro_out    = node[STAGES-1];

  initial head_q = 1'b1;

  always begin
    wait (head_next != head_q);
    #(LOOP_PS);
    head_q = head_next;
  end
endmodule
