// tb_uart_tx: checks the serial transmitter.
//
// Random bytes are written whenever tbe is 1. A line monitor finds each
// start bit, samples every bit in its middle and checks the eight data
// bits, the odd parity bit and the stop bit. It also checks that tbe drops
// after a write and stays low for the whole 11-bit frame, and that a write
// while busy is ignored.
module tb_uart_tx;
  timeunit 1ns; timeprecision 1ps;

  localparam int B = 8;  // clock cycles per bit

  logic       clk = 1'b0, rst_n, write, tbe, tx;
  logic [7:0] data;
  int         checks = 0, failures = 0;
  byte        sent [$];

  uart_tx #(.CLK_HZ(B * 1000), .BAUD(1000)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Line monitor.
  initial begin
    logic [7:0] d;
    logic       p, s;
    forever begin
      @(negedge tx);
      repeat (B / 2) @(posedge clk);
      check("start bit low", tx == 1'b0);
      for (int i = 0; i < 8; i++) begin
        repeat (B) @(posedge clk);
        d[i] = tx;
      end
      repeat (B) @(posedge clk); p = tx;
      repeat (B) @(posedge clk); s = tx;
      check("stop bit", s == 1'b1);
      check("odd parity", (^d ^ p) == 1'b1);
      if (sent.size() == 0) check("unexpected frame", 1'b0);
      else check($sformatf("data %h", d), d == 8'(sent.pop_front()));
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy;
    rst_n = 1'b0; write = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      @(negedge clk);
      while (!tbe) @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      data  = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      write = 1'b1;
      sent.push_back(data);
      @(negedge clk);
      write = 1'b0;
      busy = 0;
      // a write in the middle of the frame must be ignored
      repeat (20) begin
        if (tbe) break;
        busy++;
        @(negedge clk);
      end
      data = ~data; write = 1'b1;
      @(negedge clk);
      write = 1'b0;
      busy += 1;
      while (!tbe) begin busy++; @(negedge clk); end
      check($sformatf("tbe low for the frame (%0d cycles)", busy), busy == 11 * B + 1);
    end
    repeat (4 * B) @(posedge clk);
    check("all frames seen", sent.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
