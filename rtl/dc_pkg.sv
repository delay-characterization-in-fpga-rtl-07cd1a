// dc_pkg: types and constants shared by the ring-oscillator delay
// characterization system.
//
// It holds the workstation command codes, the instruction the data
// controller gives the measurement controller, the control word the
// measurement controller drives (timer/counter resets and enables, ring
// oscillator enable, result-ready strobe), and the delay figures that the
// behavioural ring oscillator model uses.
//
// The command codes, the six measurement-controller outputs, the 2^12-cycle
// pre-run, the 16-bit timer and the per-element delay estimates (LUT 0.086 ns,
// carry-chain XOR 0.117 ns, intra-CLB path per loop pin) follow the
// document. The encodings of the enums and the per-CLB variation pattern
// used by the model are this design's own choices.
package dc_pkg;
  timeunit 1ns; timeprecision 1ps;

  // Workstation command bytes (received in the Wait state).
  localparam logic [7:0] CMD_RESET     = 8'd0;
  localparam logic [7:0] CMD_START     = 8'd1;
  localparam logic [7:0] CMD_SET_TIMER = 8'd2;
  localparam logic [7:0] CMD_SET_TC    = 8'd3;
  localparam logic [7:0] CMD_SET_ROSEL = 8'd4;
  localparam logic [7:0] CMD_SEND      = 8'd5;

  // Instruction from the data controller to the measurement controller.
  // It is a level: it keeps its value until the next Start or Reset command.
  typedef enum logic [1:0] {
    INSTR_NONE  = 2'd0,
    INSTR_RESET = 2'd1,
    INSTR_START = 2'd2
  } instr_e;

  // Outputs of the measurement controller (Moore outputs of each state).
  typedef struct packed {
    logic rst_t;  // timer reset
    logic rst_c;  // oscillation counter reset
    logic en_t;   // timer enable
    logic en_c;   // oscillation counter enable
    logic en_r;   // ring oscillator enable
    logic wr;     // results ready: tell the data controller to send
  } ro_ctrl_t;

  localparam int unsigned TIMER_W        = 16;
  localparam int unsigned PRE_RUN_CYCLES = 4096;  // 2^12 reference cycles

  // Delay figures of the behavioural ring oscillator model, in picoseconds.
  localparam int unsigned LUT_DELAY_PS = 86;
  localparam int unsigned XOR_DELAY_PS = 117;

  // Estimated intra-CLB routing delay of the loop for each test
  // configuration (the LUT pin number that carries the loop, 1..6).
  function automatic int unsigned intra_clb_delay_ps(int unsigned pin);
    case (pin)
      1:       return 7825;
      2:       return 6838;
      3:       return 4737;
      4:       return 4737;
      5:       return 2963;
      default: return 2545;
    endcase
  endfunction

  // Loop delay of one CLB ring oscillator: eight LUTs, the routing between
  // them and the carry-chain XOR. The oscillation period is twice this.
  function automatic int unsigned ro_loop_delay_ps(int unsigned pin);
    return 8 * LUT_DELAY_PS + intra_clb_delay_ps(pin) + XOR_DELAY_PS;
  endfunction

  // Model-only spatial delay variation of the CLB at (row, col): 0..160 ps,
  // a spread of about 5 % of the loop delay for loop pin 6.
  function automatic int unsigned clb_variation_ps(int unsigned row, int unsigned col);
    return ((row * 7 + col * 13) % 17) * 10;
  endfunction

  // 6-input XOR truth table: bit i is the parity of i.
  localparam logic [63:0] LUT_INIT_XOR6 = 64'h6996_9669_9669_6996;

endpackage
