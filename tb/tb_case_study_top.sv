// tb_case_study_top: runs the single ring oscillator prototype end to end.
//
// A 31-stage and a 63-stage prototype are started by a button press. The
// LED count must equal the oscillator frequency in MHz (76 and 37 with
// 210 ps stages, within one), the divided outputs must run at 1/2 and 1/4
// of the oscillator, the oscillator must keep running after the window,
// and reset must stop it.
module tb_case_study_top;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] leds[2];
  logic [1:0] ro, d2, d4, done;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  case_study_top #(.STAGES(31)) u_p31 (
    .clk, .rst_n, .start, .leds(leds[0]), .ro_out(ro[0]), .ro_div2(d2[0]),
    .ro_div4(d4[0]), .done(done[0])
  );
  case_study_top #(.STAGES(63)) u_p63 (
    .clk, .rst_n, .start, .leds(leds[1]), .ro_out(ro[1]), .ro_div2(d2[1]),
    .ro_div4(d4[1]), .done(done[1])
  );

  int e_ro[2], e_d2[2], e_d4[2];
  for (genvar i = 0; i < 2; i++) begin : g_mon
    always @(posedge ro[i]) e_ro[i]++;
    always @(posedge d2[i]) e_d2[i]++;
    always @(posedge d4[i]) e_d4[i]++;
  end

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

  initial begin
    int stages[2];
    stages = '{31, 63};
    for (int run = 0; run < 2; run++) begin
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
      repeat (10) @(posedge clk);
      for (int i = 0; i < 2; i++) begin
        check(leds[i] === 8'd0 && done[i] === 1'b0, $sformatf("run %0d p%0d reset", run, stages[i]));
        e_ro[i] = 0;
      end
      #1 start = 1'b1;
      repeat (2) @(posedge clk);
      #1 start = 1'b0;
      wait (&done);
      #1;
      for (int i = 0; i < 2; i++) begin
        int expected;
        expected = int'($floor(1.0e6 / (2.0 * stages[i] * 210.0)));
        check(leds[i] >= 8'(expected - 1) && leds[i] <= 8'(expected + 1),
              $sformatf("run %0d p%0d LEDs %0d, expected %0d MHz", run, stages[i], leds[i], expected));
        e_ro[i] = 0; e_d2[i] = 0; e_d4[i] = 0;
      end
      #4000;
      for (int i = 0; i < 2; i++) begin
        check(e_ro[i] > 100, $sformatf("run %0d p%0d keeps oscillating", run, stages[i]));
        check(e_d2[i] >= e_ro[i] / 2 - 1 && e_d2[i] <= e_ro[i] / 2 + 1,
              $sformatf("run %0d p%0d div2 %0d of %0d", run, stages[i], e_d2[i], e_ro[i]));
        check(e_d4[i] >= e_ro[i] / 4 - 1 && e_d4[i] <= e_ro[i] / 4 + 1,
              $sformatf("run %0d p%0d div4 %0d of %0d", run, stages[i], e_d4[i], e_ro[i]));
      end
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      for (int i = 0; i < 2; i++) e_ro[i] = 0;
      #1000;
      for (int i = 0; i < 2; i++)
        check(e_ro[i] == 0 && leds[i] == 0, $sformatf("run %0d p%0d stopped by reset", run, stages[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
