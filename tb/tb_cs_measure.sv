// tb_cs_measure: checks the prototype's control, timer and 8-bit counter.
//
// A stand-in oscillator runs at a period chosen per run. After a start
// pulse the oscillator enable must rise, done must follow exactly
// MEAS_CYCLES clock cycles later, the count must equal the number of
// oscillator edges in the window (within one) modulo 256, and both must
// hold while the oscillator keeps running. Reset must clear the count and
// stop the oscillator. A start held high and a start during a measurement
// are also tried.
module tb_cs_measure;
  timeunit 1ns; timeprecision 1ps;

  localparam int MEAS = 100;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, osc = 1'b0;
  logic       ro_en, done;
  logic [7:0] count;
  realtime    half = 6.25;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;
  always begin
    #(half);
    osc = ro_en ? ~osc : 1'b0;
  end

  cs_measure #(.MEAS_CYCLES(MEAS), .CNT_W(8)) u_dut (
    .clk, .rst_n, .start, .osc, .ro_en, .count, .done
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(ro_en === 1'b0 && done === 1'b0, "reset: oscillator off, not done");
    check(count == 8'd0, $sformatf("reset: count 0 (got %0d)", count));
  endtask

  task automatic run(realtime period, bit hold_start);
    int  cycles, expected, lo, hi;
    logic [7:0] held;
    half = period / 2.0;
    do_reset();
    repeat (5) @(posedge clk);
    check(!ro_en && count == 0, "idle without start");
    #1 start = 1'b1;
    @(posedge clk); #1;
    if (!hold_start) start = 1'b0;
    check(ro_en && !done, "start: oscillator on");
    cycles = 0;
    while (!done && cycles < 1000) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == MEAS, $sformatf("window %0d cycles, expected %0d", cycles, MEAS));
    expected = int'($floor(MEAS * 10.0 / period));
    lo = (expected - 1) % 256;
    hi = (expected + 1) % 256;
    check(count == 8'(expected) || count == 8'(lo) || count == 8'(hi),
          $sformatf("period %.2f: count %0d, expected %0d mod 256 +/-1", period, count, expected));
    held = count;
    start = 1'b1;
    repeat (50) @(posedge clk);
    #1 start = 1'b0;
    check(ro_en && done, "after window: oscillator still on, done");
    check(count == held, "count holds, start ignored");
  endtask

  initial begin
    run(12.5, 1'b0);   // 80 MHz -> 80
    run(13.0, 1'b1);   // 76.9 MHz -> 76
    run(26.0, 1'b0);   // 38.5 MHz -> 38
    run(2.5, 1'b0);    // 400 MHz -> 400 mod 256 = 144 (wraps)
    run(1000.0, 1'b0); // 1 MHz -> 1
    do_reset();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
