// tb_osc_counter: checks the oscillation counter.
//
// A free-running stand-in oscillator clocks the counter. Bursts of known
// numbers of rising edges are given with en high and low, and the
// asynchronous reset is applied while the oscillator is stopped; the count
// must match the number of enabled edges.
module tb_osc_counter;
  timeunit 1ns; timeprecision 1ps;

  logic        osc = 1'b0, rst = 1'b0, en;
  logic [15:0] count;
  int          checks = 0, failures = 0;
  int unsigned expected;

  osc_counter #(.WIDTH(16)) u_dut (.osc(osc), .rst(rst), .en(en), .count(count));

  task automatic pulses(int n);
    repeat (n) begin
      #2.1 osc = 1'b1;
      #2.1 osc = 1'b0;
    end
  endtask

  task automatic check(string what);
    #1;
    checks++;
    if (count !== 16'(expected)) begin
      failures++;
      $display("FAIL %s: count=%0d expected=%0d", what, count, expected);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    #1 check("power-up value");
    pulses(3);
    rst = 1'b1;
    #10 rst = 1'b0;
    expected = 0;
    check("after reset");
    for (int k = 0; k < 20; k++) begin
      int n;
      n = $urandom_range(1, 300);
      en = 1'($urandom);
      #1;
      pulses(n);
      if (en) expected += n;
      check($sformatf("burst %0d en=%b n=%0d", k, en, n));
      if (k % 7 == 6) begin
        rst = 1'b1; #3; rst = 1'b0;
        expected = 0;
        check("async reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
