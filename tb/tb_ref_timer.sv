// tb_ref_timer: checks the reference timer against a reference model under
// random reset and enable, including the wrap at 2^16.
module tb_ref_timer;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b0, rst, en;
  logic [15:0] count;
  int unsigned model;
  int          checks = 0, failures = 0;

  ref_timer u_dut (.clk(clk), .rst(rst), .en(en), .count(count));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    @(posedge clk);
    model = 0;
    // random phase
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      rst = ($urandom_range(99) < 3);
      en  = ($urandom_range(99) < 80);
      @(posedge clk);
      if (rst) model = 0;
      else if (en) model = (model + 1) % 65536;
      #1;
      checks++;
      if (count !== 16'(model)) begin
        failures++;
        $display("FAIL count=%0d model=%0d", count, model);
      end
    end
    // wrap: load near the top by counting, without reset
    @(negedge clk); rst = 1'b1; en = 1'b0;
    @(negedge clk); rst = 1'b0; en = 1'b1;
    repeat (65536) @(posedge clk);
    #1;
    checks++;
    if (count !== 16'd0) begin
      failures++;
      $display("FAIL no wrap after 65536 counts: %0d", count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
