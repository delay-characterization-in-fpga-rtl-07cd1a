// ro_clb: behavioural model of the nine-stage ring oscillator that fills one
// Virtex-5 CLB. This is a simulation model, not synthesizable logic: the
// real oscillator is a hand-placed, hand-routed hard macro.
//
// The loop runs through the eight LUTs of the CLB (four in each slice) and
// the first XOR of the carry chain. Every LUT holds the 6-input XOR. One pin
// per LUT, the same pin number in all eight (LOOP_PIN, fixed by the
// configuration), carries the loop; the other five pins of every LUT are
// tied to the 5-bit test case, so each LUT is an inverter or a buffer
// depending on the test case parity, and the eight of them together never
// invert. The carry-chain XOR adds the ninth inversion when en is 1; with
// en at 0 the loop has an even number of inversions and holds still.
//
// Timing: the whole loop delay (eight LUTs, the intra-CLB routing estimate
// for LOOP_PIN and the XOR, plus EXTRA_DELAY_PS for spatial variation or
// ageing) is lumped at the XOR output, so the oscillator toggles every
// loop delay and its frequency is 1 / (2 * loop delay). ro_out is the output
// of the LUT that feeds the XOR, passed through the proxy's identity LUT
// (modelled without delay) so the counter wiring cannot load the loop.
//
// The structure, the XOR functions, the enable gate and the delay estimates
// follow the document. How the five test-case bits are spread over the free
// pins (lowest bit on the lowest free pin) and the lumped-delay model are
// this design's own choices.
//
// A synthesis tool reports a combinational loop through the eight LUTs and
// the XOR: that loop is the oscillator, and it is intended.
module ro_clb #(
  parameter int unsigned LOOP_PIN       = 6,  // 1..6: LUT pin A<n> on the loop
  parameter int unsigned EXTRA_DELAY_PS = 0
) (
  input  logic       en,
  input  logic [4:0] test_case,
  output logic       ro_out
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LOOP_PS = dc_pkg::ro_loop_delay_ps(LOOP_PIN) + EXTRA_DELAY_PS;

  logic       xor_q;     // carry-chain XOR output: the state of the loop
  logic [8:0] node;      // node[0] = XOR output, node[i+1] = output of LUT i
  logic       loop_next; // value the XOR output settles to

  // Place the loop signal on LOOP_PIN and the test case on the other pins.
  function automatic logic [5:0] lut_pins(logic loop_in, logic [4:0] tc);
    logic [5:0] a;
    int unsigned k = 0;
    for (int unsigned p = 1; p <= 6; p++) begin
      if (p == LOOP_PIN) a[p-1] = loop_in;
      else begin
        a[p-1] = tc[k];
        k++;
      end
    end
    return a;
  endfunction

  assign node[0] = xor_q;

  for (genvar i = 0; i < 8; i++) begin : g_lut
    lut6 u_lut (
      .a (lut_pins(node[i], test_case)),
      .o (node[i+1])
    );
  end

  assign loop_next = node[8] ^ en;
  assign ro_out    = node[8];

  initial xor_q = 1'b0;

  // Whenever the loop is out of balance, the XOR output follows one loop
  // delay later.
  always begin
    wait (loop_next != xor_q);
    #(LOOP_PS);
    xor_q = loop_next;
  end
endmodule
