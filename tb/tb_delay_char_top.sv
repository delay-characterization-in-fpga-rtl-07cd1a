// tb_delay_char_top: end-to-end test of the delay characterization system
// at reduced size (4 x 3 array, 64-cycle pre-run, 16 clock cycles per
// serial bit), with one aged CLB at row 2, column 1.
//
// The testbench plays the workstation: it sends command bytes on the
// serial line and decodes the result frames (odd parity checked). For each
// measurement it works out the expected count of every column from the
// oscillator model's loop delay (3350 ps for loop pin 6, plus the CLB's
// variation offset ((7 r + 13 c) mod 17) x 10 ps, plus the ageing offset):
// count = window / (2 x loop delay), within 2. It also checks that the
// oscillators run for exactly pre-run + 1 + window reference cycles.
//
// Mechanisms exercised and counted: Set Timer, Set Test Case, Set RO
// Select, Start/measurement, Send Result re-send, Reset, an ignored
// unknown command, an out-of-range row (all counts 0), a test case of even
// parity, localising the aged CLB as the slowest of its row, and one
// button-started measurement of the 31- and 63-stage prototype oscillators.
module tb_delay_char_top;
  timeunit 1ns; timeprecision 1ps;

  localparam int ROWS = 4, COLS = 3, PRE = 64;
  localparam int BITC = 16;               // clock cycles per serial bit
  localparam int AR = 2, AC = 1, APS = 400;
  localparam logic [9:0] TEMP = 10'd652;

  logic clk = 1'b0, rst_n, rx_line, tx_line;
  int   checks = 0, failures = 0;
  byte  rxq [$];

  // single ring oscillator prototype (31 and 63 stages)
  logic       cs_start = 1'b0;
  logic [7:0] cs_leds [2];
  logic [1:0] cs_ro, cs_div2, cs_div4, cs_done;
  int         cs_e_ro [2], cs_e_d4 [2];
  for (genvar p = 0; p < 2; p++) begin : g_cs_mon
    always @(posedge cs_ro[p])   cs_e_ro[p]++;
    always @(posedge cs_div4[p]) cs_e_d4[p]++;
  end
  int   en_r_cycles = 0;

  int n_meas = 0, n_resend = 0, n_reset = 0, n_ignored = 0;
  int n_out_of_range = 0, n_even_tc = 0, n_aged_found = 0, n_proto = 0;

  delay_char_top #(
    .CLK_HZ(100_000_000), .BAUD(100_000_000 / BITC), .ROWS(ROWS), .COLS(COLS),
    .PRE_RUN_CYCLES(PRE), .AGED_ROW(AR), .AGED_COL(AC), .AGED_PS(APS)
  ) u_dut (
    .clk, .rst_n, .uart_rx(rx_line), .uart_tx(tx_line), .temp(TEMP),
    .cs_start, .cs_leds, .cs_ro, .cs_div2, .cs_div4, .cs_done
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (u_dut.ctrl.en_r) en_r_cycles++;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Workstation transmitter.
  task automatic send(logic [7:0] b);
    logic [10:0] f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rx_line = f[i];
      repeat (BITC) @(posedge clk);
    end
  endtask

  // Workstation receiver.
  initial begin
    logic [7:0] d;
    logic       p;
    forever begin
      @(negedge tx_line);
      repeat (BITC / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BITC) @(posedge clk);
        d[i] = tx_line;
      end
      repeat (BITC) @(posedge clk);
      p = tx_line;
      repeat (BITC) @(posedge clk);
      check("result frame parity and stop bit", ((^d ^ p) == 1'b1) && tx_line);
      rxq.push_back(d);
    end
  end

  task automatic get_results(output int cnt [COLS], output int t);
    int guard = 0;
    while (rxq.size() < 2 * COLS + 2 && guard < 200_000) begin
      @(posedge clk);
      guard++;
    end
    check("all result bytes arrived", rxq.size() == 2 * COLS + 2);
    for (int c = 0; c < COLS; c++) begin
      cnt[c] = {8'(rxq.pop_front()), 8'(rxq.pop_front())};
    end
    t = {8'(rxq.pop_front()), 8'(rxq.pop_front())};
    check("temperature word", t == int'(TEMP));
  endtask

  function automatic int loop_ps(int r, int c);
    int d = 8 * 86 + 2545 + 117 + ((r * 7 + c * 13) % 17) * 10;
    if (r == AR && c == AC) d += APS;
    return d;
  endfunction

  function automatic int expected_count(int r, int c, int window);
    return (window * 10_000) / (2 * loop_ps(r, c));
  endfunction

  task automatic measure(int row, int tc, int window);
    int cnt [COLS];
    int t, e0, slow;
    send(8'd2); send(8'(window >> 8)); send(8'(window));
    send(8'd3); send(8'(tc));
    send(8'd4); send(8'(row));
    e0 = en_r_cycles;
    send(8'd1);
    get_results(cnt, t);
    n_meas++;
    if (($countones(tc) % 2) == 0) n_even_tc++;
    check($sformatf("oscillators ran pre-run + 1 + window cycles (%0d)", en_r_cycles - e0),
          en_r_cycles - e0 == PRE + 1 + window);
    slow = 0;
    for (int c = 0; c < COLS; c++) begin
      int e = (row < ROWS) ? expected_count(row, c, window) : 0;
      check($sformatf("row %0d col %0d count %0d expected %0d", row, c, cnt[c], e),
            cnt[c] >= e - 2 && cnt[c] <= e + 2);
      if (cnt[c] < cnt[slow]) slow = c;
    end
    if (row >= ROWS) begin
      if (cnt[0] == 0) n_out_of_range++;
    end else if (row == AR) begin
      check("aged CLB is the slowest of its row", slow == AC);
      if (slow == AC) n_aged_found++;
    end
    // Re-send must repeat the same numbers.
    begin
      int cnt2 [COLS];
      send(8'd5);
      get_results(cnt2, t);
      check("re-sent results equal", cnt2 == cnt);
      n_resend++;
    end
    send(8'd0);
    n_reset++;
  endtask

  // Press the prototype's button: both LED counts must read the model
  // frequency in MHz (within 1) and the oscillators, undivided and divided
  // by 4, must keep running after the window.
  task automatic run_prototype();
    cs_start = 1'b1;
    repeat (2) @(posedge clk);
    cs_start = 1'b0;
    wait (&cs_done);
    #1;
    for (int p = 0; p < 2; p++) begin
      int mhz;
      mhz = int'($floor(1.0e6 / (2.0 * (p == 0 ? 31 : 63) * 210.0)));
      check($sformatf("prototype %0d LEDs %0d, expected %0d MHz", p, cs_leds[p], mhz),
            int'(cs_leds[p]) >= mhz - 1 && int'(cs_leds[p]) <= mhz + 1);
      cs_e_ro[p] = 0;
      cs_e_d4[p] = 0;
    end
    #2000;
    for (int p = 0; p < 2; p++)
      check($sformatf("prototype %0d runs on, /4 output %0d of %0d edges", p, cs_e_d4[p], cs_e_ro[p]),
            cs_e_ro[p] > 50 && cs_e_d4[p] >= cs_e_ro[p] / 4 - 1 && cs_e_d4[p] <= cs_e_ro[p] / 4 + 1);
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; rx_line = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    run_prototype();
    n_proto++;
    rst_n = 1'b0;  // reset stops the prototype oscillators
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    send(8'd77);  // unknown command: ignored
    n_ignored++;
    check("unknown command changed nothing", u_dut.instr == dc_pkg::INSTR_NONE);
    measure(2, 31, 600);
    measure(0, 31, 300);
    measure(3, 6, 450);    // even-parity test case
    measure(9, 31, 200);   // no such row
    measure(1, 1, 1000);
    check("measurement ran", n_meas == 5);
    check("re-send used", n_resend > 0);
    check("reset used", n_reset > 0);
    check("unknown command seen", n_ignored > 0);
    check("out-of-range row measured as 0", n_out_of_range == 1);
    check("even-parity test case used", n_even_tc > 0);
    check("aged CLB localised", n_aged_found == 1);
    check("prototype measured", n_proto == 1);
    $display("mechanisms: measure=%0d resend=%0d reset=%0d ignored=%0d out_of_range=%0d even_tc=%0d aged_found=%0d prototype=%0d",
             n_meas, n_resend, n_reset, n_ignored, n_out_of_range, n_even_tc, n_aged_found,
             n_proto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
