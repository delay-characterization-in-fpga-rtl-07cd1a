// tb_delay_char_configs: the six test configurations side by side.
//
// Six copies of the system (4 x 3 arrays, 64-cycle pre-run, fast serial
// link), one per loop pin 1..6, are driven in parallel by six workstation
// models. Each measures row 1 with test case 31 for 2000 reference cycles;
// every count must match 2000 x 10 ns / (2 x loop delay) within 2, with the
// loop delay 8 x 86 ps + 117 ps + the pin's routing estimate (7825, 6838,
// 4737, 4737, 2963, 2545 ps) + the CLB's variation offset
// ((7 r + 13 c) mod 17) x 10 ps. Pin 6 must give the fastest oscillators
// and pin 1 the slowest.
module tb_delay_char_configs;
  timeunit 1ns; timeprecision 1ps;

  localparam int ROWS = 4, COLS = 3, PRE = 64, BITC = 16;
  localparam int WINDOW = 2000, ROW = 1;
  localparam int ROUTE_PS [6] = '{7825, 6838, 4737, 4737, 2963, 2545};

  logic clk = 1'b0, rst_n;
  logic [5:0] rx_line, tx_line;
  int   checks = 0, failures = 0;
  int   cnt [6][COLS];
  int   done = 0;

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  for (genvar p = 0; p < 6; p++) begin : g_cfg
    byte rxq [$];

    delay_char_top #(
      .BAUD(100_000_000 / BITC), .ROWS(ROWS), .COLS(COLS),
      .LOOP_PIN(p + 1), .PRE_RUN_CYCLES(PRE)
    ) u_dut (
      .clk, .rst_n, .uart_rx(rx_line[p]), .uart_tx(tx_line[p]), .temp(10'd0),
      .cs_start(1'b0), .cs_leds(), .cs_ro(), .cs_div2(), .cs_div4(), .cs_done()
    );

    task automatic send(logic [7:0] b);
      logic [10:0] f = {1'b1, ~^b, b, 1'b0};
      for (int i = 0; i < 11; i++) begin
        rx_line[p] = f[i];
        repeat (BITC) @(posedge clk);
      end
    endtask

    initial begin
      logic [7:0] d;
      forever begin
        @(negedge tx_line[p]);
        repeat (BITC / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (BITC) @(posedge clk);
          d[i] = tx_line[p];
        end
        repeat (2 * BITC) @(posedge clk);
        rxq.push_back(d);
      end
    end

    initial begin
      rx_line[p] = 1'b1;
      @(posedge rst_n);
      repeat (5) @(posedge clk);
      send(8'd2); send(8'(WINDOW >> 8)); send(8'(WINDOW));
      send(8'd3); send(8'd31);
      send(8'd4); send(8'(ROW));
      send(8'd1);
      wait (rxq.size() == 2 * COLS + 2);
      for (int c = 0; c < COLS; c++) cnt[p][c] = {8'(rxq.pop_front()), 8'(rxq.pop_front())};
      done++;
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 6);
    for (int p = 0; p < 6; p++)
      for (int c = 0; c < COLS; c++) begin
        int loop_ps, e;
        loop_ps = 8 * 86 + 117 + ROUTE_PS[p] + ((ROW * 7 + c * 13) % 17) * 10;
        e = (WINDOW * 10_000) / (2 * loop_ps);
        $display("pin %0d col %0d: count %0d (%0.2f MHz), expected %0d", p + 1, c, cnt[p][c],
                 real'(cnt[p][c]) * 100.0 / real'(WINDOW), e);
        check($sformatf("pin %0d col %0d", p + 1, c), cnt[p][c] >= e - 2 && cnt[p][c] <= e + 2);
      end
    for (int c = 0; c < COLS; c++) begin
      check("pin 6 fastest", cnt[5][c] > cnt[4][c] && cnt[4][c] > cnt[3][c]);
      check("pin 1 slowest", cnt[0][c] < cnt[1][c] && cnt[1][c] < cnt[2][c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
