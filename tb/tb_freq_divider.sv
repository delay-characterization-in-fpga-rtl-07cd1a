// tb_freq_divider: checks the divide-by-2 and divide-by-4 outputs.
//
// Bursts of input edges of random length are applied; the outputs must
// have toggled once per input rising edge (div2) and once per rising edge of div2 (div4)
// since the last reset, and the asynchronous reset must clear both.
module tb_freq_divider;
  timeunit 1ns; timeprecision 1ps;

  logic clk_in = 1'b0, rst = 1'b0;
  logic div2, div4;
  int   checks = 0, failures = 0;
  int   n = 0;

  freq_divider u_dut (.clk_in, .rst, .div2, .div4);

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
    #1 rst = 1'b1;  // a rising edge, whatever the flops hold at power-up
    #2 rst = 1'b0;
    #1 check(div2 === 1'b0 && div4 === 1'b0, "reset value");
    for (int k = 0; k < 30; k++) begin
      int b;
      b = $urandom_range(1, 9);
      repeat (b) begin
        #1.3 clk_in = 1'b1;
        #1.3 clk_in = 1'b0;
        n++;
      end
      #1;
      check(div2 === 1'(n % 2), $sformatf("div2 after %0d edges", n));
      check(div4 === 1'(((n + 1) / 2) % 2), $sformatf("div4 after %0d edges", n));
      if (k % 10 == 9) begin
        rst = 1'b1; #1 rst = 1'b0; n = 0;
        #1 check(div2 === 1'b0 && div4 === 1'b0, "async reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
