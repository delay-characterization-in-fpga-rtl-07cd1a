// tb_delay_char_workloads: the measurement campaigns of the delay
// characterization method, run on the full 20 x 5 array with the full
// 2^12-cycle pre-run; only the serial link is sped up (16 clock cycles per
// bit) to keep the simulation short.
//
//   1. Measurement-time sweep: one row measured with windows of 1000 to
//      25000 reference cycles. Every count must match window / (2 x loop
//      delay) within 2, and the derived frequency must agree within 0.1 %.
//   2. Test-case sweep: one row measured for all 32 test cases in the
//      loop-pin-6 configuration (the model has no parity effect, so every
//      test case must give the same counts within 2).
//   3. Area map: all 20 rows measured for 3000 cycles, giving the delay map
//      of one array configuration; the slowest and fastest CLB found must
//      be the ones the model's offsets predict.
module tb_delay_char_workloads;
  timeunit 1ns; timeprecision 1ps;

  localparam int ROWS = 20, COLS = 5;
  localparam int BITC = 16;
  localparam logic [9:0] TEMP = 10'd640;

  logic clk = 1'b0, rst_n, rx_line, tx_line;
  int   checks = 0, failures = 0;
  byte  rxq [$];

  delay_char_top #(.BAUD(100_000_000 / BITC)) u_dut (
    .clk, .rst_n, .uart_rx(rx_line), .uart_tx(tx_line), .temp(TEMP),
    .cs_start(1'b0), .cs_leds(), .cs_ro(), .cs_div2(), .cs_div4(), .cs_done()
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
    forever begin
      @(negedge tx_line);
      repeat (BITC / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BITC) @(posedge clk);
        d[i] = tx_line;
      end
      repeat (2 * BITC) @(posedge clk);
      rxq.push_back(d);
    end
  end

  function automatic int loop_ps(int r, int c);
    return 8 * 86 + 2545 + 117 + ((r * 7 + c * 13) % 17) * 10;
  endfunction

  function automatic int expected_count(int r, int c, int window);
    return (window * 10_000) / (2 * loop_ps(r, c));
  endfunction

  task automatic measure(int row, int tc, int window, output int cnt [COLS]);
    int t;
    send(8'd2); send(8'(window >> 8)); send(8'(window));
    send(8'd3); send(8'(tc));
    send(8'd4); send(8'(row));
    send(8'd1);
    wait (rxq.size() == 2 * COLS + 2);
    for (int c = 0; c < COLS; c++) cnt[c] = {8'(rxq.pop_front()), 8'(rxq.pop_front())};
    t = {8'(rxq.pop_front()), 8'(rxq.pop_front())};
    check("temperature word", t == int'(TEMP));
    for (int c = 0; c < COLS; c++) begin
      int e = expected_count(row, c, window);
      check($sformatf("row %0d col %0d tc %0d window %0d: count %0d expected %0d", row, c, tc, window, cnt[c], e),
            cnt[c] >= e - 2 && cnt[c] <= e + 2);
    end
    send(8'd0);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [COLS], ref_cnt [COLS];
    int windows [7] = '{1000, 2000, 3000, 5000, 10000, 20000, 25000};
    real f_ref [COLS];
    int slow_r, slow_c, fast_r, fast_c, exp_slow, exp_fast;
    int lo, hi;

    rst_n = 1'b0; rx_line = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. measurement-time sweep
    foreach (windows[k]) begin
      measure(4, 31, windows[k], cnt);
      for (int c = 0; c < COLS; c++) begin
        real f;
        f = real'(cnt[c]) * 100.0 / real'(windows[k]);  // MHz
        if (k == 0) f_ref[c] = 1.0e6 / (2.0 * real'(loop_ps(4, c)));
        check($sformatf("sweep col %0d window %0d: %0.3f MHz vs %0.3f", c, windows[k], f, f_ref[c]),
              (f - f_ref[c]) < 0.001 * f_ref[c] + 100.0 * 2.0 / real'(windows[k]) &&
              (f_ref[c] - f) < 0.001 * f_ref[c] + 100.0 * 2.0 / real'(windows[k]));
      end
      $display("window %0d: col0 %0.3f MHz", windows[k], real'(cnt[0]) * 100.0 / real'(windows[k]));
    end

    // 2. test-case sweep
    for (int tc = 0; tc < 32; tc++) begin
      measure(10, tc, 3000, cnt);
      if (tc == 0) ref_cnt = cnt;
      for (int c = 0; c < COLS; c++)
        check($sformatf("test case %0d col %0d same as test case 0", tc, c),
              cnt[c] >= ref_cnt[c] - 2 && cnt[c] <= ref_cnt[c] + 2);
    end

    // 3. area map
    lo = 1 << 30; hi = 0;
    exp_slow = 0; exp_fast = 1 << 30;
    for (int r = 0; r < ROWS; r++) begin
      measure(r, 31, 3000, cnt);
      for (int c = 0; c < COLS; c++) begin
        if (cnt[c] < lo) begin lo = cnt[c]; slow_r = r; slow_c = c; end
        if (cnt[c] > hi) begin hi = cnt[c]; fast_r = r; fast_c = c; end
      end
    end
    $display("area map: fastest CLB r%0d c%0d (%0.2f MHz), slowest r%0d c%0d (%0.2f MHz)",
             fast_r, fast_c, hi / 30.0, slow_r, slow_c, lo / 30.0);
    check("slowest CLB has the largest offset", (((slow_r * 7 + slow_c * 13) % 17) == 16));
    check("fastest CLB has no offset", (((fast_r * 7 + fast_c * 13) % 17) == 0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
