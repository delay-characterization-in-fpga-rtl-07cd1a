// tb_uart_rx: checks the serial receiver.
//
// A line driver sends frames (start, 8 data bits LSB first, parity, stop)
// with the bit time of the receiver. Checks: good frames arrive with rda
// set and the right data; rda and data are held until read; a frame sent
// while rda is still set is lost; frames with even parity or a low stop bit
// are dropped with an err pulse; a short low glitch does not start a frame.
module tb_uart_rx;
  timeunit 1ns; timeprecision 1ps;

  localparam int B = 16;

  logic       clk = 1'b0, rst_n, rx, rda, read, err;
  logic [7:0] data;
  int         checks = 0, failures = 0, errs = 0;

  uart_rx #(.CLK_HZ(B * 1000), .BAUD(1000)) u_dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (err) errs++;

  task automatic send(logic [7:0] d, bit bad_parity = 0, bit bad_stop = 0);
    logic [10:0] f;
    f = {~bad_stop, (~^d) ^ bad_parity, d, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rx = f[i];
      repeat (B) @(posedge clk);
    end
    rx = 1'b1;
    repeat (B) @(posedge clk);
  endtask

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (rda=%b data=%h errs=%0d)", what, rda, data, errs);
    end
  endtask

  task automatic take(logic [7:0] exp);
    check($sformatf("rda for %h", exp), rda == 1'b1);
    check($sformatf("data %h", exp), data == exp);
    @(negedge clk); read = 1'b1;
    @(negedge clk); read = 1'b0;
    check("rda cleared by read", rda == 1'b0);
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    rst_n = 1'b0; rx = 1'b1; read = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      d = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      send(d);
      repeat ($urandom_range(0, 40)) @(posedge clk);
      take(d);
    end
    // hold until read; the next frame is lost
    send(8'hA5);
    send(8'h3C);
    take(8'hA5);
    repeat (2 * B) @(posedge clk);
    check("second frame lost while rda was set", rda == 1'b0);
    // bad parity, bad stop bit
    errs = 0;
    send(8'h55, 1, 0);
    check("bad parity dropped", rda == 1'b0 && errs == 1);
    send(8'h55, 0, 1);
    repeat (B) @(posedge clk);
    check("bad stop dropped", rda == 1'b0 && errs == 2);
    // glitch
    rx = 1'b0; repeat (3) @(posedge clk); rx = 1'b1;
    repeat (12 * B) @(posedge clk);
    check("glitch ignored", rda == 1'b0 && errs == 2);
    send(8'h81);
    take(8'h81);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
