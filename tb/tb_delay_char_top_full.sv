// tb_delay_char_top_full: one complete measurement with the system at its
// full default size: 100 MHz reference clock, 9600 baud, 20 x 5 array,
// 2^12-cycle pre-run, loop pin 6.
//
// As the workstation it sets a 3000-cycle measurement window, test case 31
// and row 19, starts the measurement and decodes the 12 result bytes. Each
// column's count must equal window / (2 x loop delay) within 2, where the
// loop delay is 3350 ps plus the CLB's variation offset
// ((7 r + 13 c) mod 17) x 10 ps; the temperature word must come back as
// given. It then resets, measures row 0 for 1000 cycles and checks again.
// Before that, the 31- and 63-stage prototype oscillators are started with
// their button and their LED counts checked (76 and 37 MHz).
module tb_delay_char_top_full;
  timeunit 1ns; timeprecision 1ps;

  localparam int COLS = 5;
  localparam int BITC = 100_000_000 / 9600;  // clock cycles per serial bit
  localparam logic [9:0] TEMP = 10'd700;

  logic clk = 1'b0, rst_n, rx_line, tx_line;
  int   checks = 0, failures = 0;
  byte  rxq [$];
  int   n_proto = 0;

  // single ring oscillator prototype (31 and 63 stages)
  logic       cs_start = 1'b0;
  logic [7:0] cs_leds [2];
  logic [1:0] cs_ro, cs_div2, cs_div4, cs_done;
  int         cs_e_ro [2], cs_e_d4 [2];
  for (genvar p = 0; p < 2; p++) begin : g_cs_mon
    always @(posedge cs_ro[p])   cs_e_ro[p]++;
    always @(posedge cs_div4[p]) cs_e_d4[p]++;
  end

  delay_char_top u_dut (
    .clk, .rst_n, .uart_rx(rx_line), .uart_tx(tx_line), .temp(TEMP),
    .cs_start, .cs_leds, .cs_ro, .cs_div2, .cs_div4, .cs_done
  );

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send(logic [7:0] b);
    logic [10:0] f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rx_line = f[i];
      repeat (BITC) @(posedge clk);
    end
  endtask

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

  function automatic int expected_count(int r, int c, int window);
    int d = 8 * 86 + 2545 + 117 + ((r * 7 + c * 13) % 17) * 10;
    return (window * 10_000) / (2 * d);
  endfunction

  task automatic measure(int row, int window);
    int cnt, t, e;
    send(8'd2); send(8'(window >> 8)); send(8'(window));
    send(8'd3); send(8'd31);
    send(8'd4); send(8'(row));
    send(8'd1);
    wait (rxq.size() == 2 * COLS + 2);
    for (int c = 0; c < COLS; c++) begin
      cnt = {8'(rxq.pop_front()), 8'(rxq.pop_front())};
      e = expected_count(row, c, window);
      $display("row %0d col %0d: count %0d (%0.2f MHz), expected %0d", row, c, cnt,
               real'(cnt) * 100.0 / real'(window), e);
      check($sformatf("row %0d col %0d count", row, c), cnt >= e - 2 && cnt <= e + 2);
    end
    t = {8'(rxq.pop_front()), 8'(rxq.pop_front())};
    check("temperature word", t == int'(TEMP));
    send(8'd0);
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
    #60_000_000;
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
    measure(19, 3000);
    measure(0, 1000);
    check("prototype measured", n_proto == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
