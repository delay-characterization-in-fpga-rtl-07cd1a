// tb_ro_clb: checks the CLB ring oscillator model.
//
// For loop pin 6 and loop pin 1 it checks that the oscillator is still
// while disabled, that once enabled its period is twice the loop delay
// worked out from the per-element estimates (8 x 86 ps LUTs, the routing
// estimate of the pin, 117 ps XOR), for several test cases of both
// parities, and that it stops again when disabled.
module tb_ro_clb;
  timeunit 1ps; timeprecision 1ps;

  // Expected loop delays, computed by hand from the element estimates.
  localparam int LOOP6 = 8 * 86 + 2545 + 117;  // 3350 ps
  localparam int LOOP1 = 8 * 86 + 7825 + 117;  // 8630 ps
  localparam int EXTRA = 40;

  logic       en;
  logic [4:0] tc;
  logic       out6, out1;
  int         checks = 0, failures = 0;
  int         edges6 = 0, edges1 = 0;
  realtime    t_last6, t_last1, per6, per1;

  ro_clb #(.LOOP_PIN(6), .EXTRA_DELAY_PS(EXTRA)) u_ro6 (.en(en), .test_case(tc), .ro_out(out6));
  ro_clb #(.LOOP_PIN(1))                         u_ro1 (.en(en), .test_case(tc), .ro_out(out1));

  always @(posedge out6) begin
    edges6++;
    per6    = $realtime - t_last6;
    t_last6 = $realtime;
  end
  always @(posedge out1) begin
    edges1++;
    per1    = $realtime - t_last1;
    t_last1 = $realtime;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (per6=%0t per1=%0t edges6=%0d edges1=%0d)", what, per6, per1, edges6, edges1);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e6, e1;
    en = 1'b0;
    tc = 5'd0;
    #100_000;
    check("still while disabled", edges6 == 0 && edges1 == 0);
    for (int k = 0; k < 6; k++) begin
      tc = 5'((k * 11 + 1) % 32);   // 1, 12, 23, 2, 13, 24: both parities
      en = 1'b1;
      #200_000;
      check($sformatf("pin 6 period tc=%0d", tc), per6 == realtime'(2 * (LOOP6 + EXTRA)));
      check($sformatf("pin 1 period tc=%0d", tc), per1 == realtime'(2 * LOOP1));
      en = 1'b0;
      #50_000;
      e6 = edges6; e1 = edges1;
      #100_000;
      check("stops when disabled", e6 == edges6 && e1 == edges1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
