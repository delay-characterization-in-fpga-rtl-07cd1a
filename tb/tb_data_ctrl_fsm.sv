// tb_data_ctrl_fsm: checks the data control state machine with simple
// stand-ins for the UART and the measurement controller.
//
// The receiver stand-in presents one byte at a time and waits for read;
// the transmitter stand-in drops tbe for a few cycles after each write and
// records the bytes. Checks: Set Timer (two bytes, high first), Set Test
// Case and Set RO Select load their registers; unknown commands change
// nothing; Reset and Start set the instruction; after Start nothing is
// sent until wr, and then the counts and the temperature go out high byte
// first; Send Result from Wait re-sends the same bytes.
module tb_data_ctrl_fsm;
  timeunit 1ns; timeprecision 1ps;
  import dc_pkg::*;

  localparam int COLS = 3;

  logic        clk = 1'b0, rst_n;
  logic [7:0]  rx_data, tx_data, test_case, ro_sel;
  logic        rda, read, write, tbe, wr;
  instr_e      instr;
  logic [15:0] set_time;
  logic [15:0] counts [COLS];
  logic [9:0]  temp;
  int          checks = 0, failures = 0;
  byte         got [$];
  int          tbe_low = 0;

  data_ctrl_fsm #(.COLS(COLS)) u_dut (.*);

  always #5 clk = ~clk;

  // Transmitter stand-in: busy for 6 cycles after each write.
  always_ff @(posedge clk) begin
    if (!rst_n) tbe_low <= 0;
    else if (write && tbe) begin
      got.push_back(tx_data);
      tbe_low <= 6;
    end else if (tbe_low > 0) tbe_low <= tbe_low - 1;
  end
  assign tbe = (tbe_low == 0);

  // Receiver stand-in.
  task automatic put(logic [7:0] b);
    @(negedge clk);
    rx_data = b; rda = 1'b1;
    do @(posedge clk); while (!read);
    #1 rda = 1'b0;
    repeat (3) @(posedge clk);
  endtask

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic expect_results(string what);
    byte exp [$];
    foreach (counts[c]) begin exp.push_back(counts[c][15:8]); exp.push_back(counts[c][7:0]); end
    exp.push_back({6'b0, temp[9:8]});
    exp.push_back(temp[7:0]);
    check({what, ": byte count"}, got.size() == exp.size());
    foreach (exp[i]) if (i < got.size()) check($sformatf("%s byte %0d", what, i), got[i] == exp[i]);
    got.delete();
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; rda = 1'b0; rx_data = '0; wr = 1'b0;
    counts = '{16'h1234, 16'hBEEF, 16'h00A7}; temp = 10'h2C5;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check("reset values", set_time == 16'd3000 && test_case == 0 && ro_sel == 0 && instr == INSTR_NONE);
    put(CMD_SET_TIMER); put(8'h0B); put(8'hB9);
    check("set timer", set_time == 16'h0BB9);
    put(CMD_SET_TIMER); put(8'h12); put(8'h34);
    check("set timer 0x1234", set_time == 16'h1234);
    put(CMD_SET_TC); put(8'd31);
    check("set test case", test_case == 8'd31);
    put(CMD_SET_ROSEL); put(8'd17);
    check("set ro select", ro_sel == 8'd17);
    put(8'd9); put(8'd200);
    check("unknown commands ignored", set_time == 16'h1234 && test_case == 31 && ro_sel == 17 && instr == INSTR_NONE);
    put(CMD_RESET);
    check("reset instruction", instr == INSTR_RESET);
    put(CMD_START);
    check("start instruction", instr == INSTR_START);
    repeat (50) @(posedge clk);
    check("nothing sent before wr", got.size() == 0);
    @(negedge clk); wr = 1'b1; @(negedge clk); wr = 1'b0;
    repeat (200) @(posedge clk);
    expect_results("after measurement");
    counts[1] = 16'h0F0F;
    put(CMD_SEND);
    repeat (200) @(posedge clk);
    expect_results("resend");
    put(CMD_SET_TC); put(8'd4);
    check("back in wait after send", test_case == 8'd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
