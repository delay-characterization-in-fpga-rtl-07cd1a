// tb_selection_wrapper: checks the row decoder and column multiplexers.
//
// Random oscillator output patterns, row numbers (in and out of range) and
// enables are applied; row_en must be one-hot on the selected row only when
// en_r is 1, and col_osc must equal the selected row's outputs (0 for an
// out-of-range row).
module tb_selection_wrapper;
  timeunit 1ns; timeprecision 1ps;

  localparam int ROWS = 6, COLS = 3;

  logic            en_r;
  logic [7:0]      ro_sel;
  logic [COLS-1:0] ro_out [ROWS];
  logic [ROWS-1:0] row_en;
  logic [COLS-1:0] col_osc;
  int              checks = 0, failures = 0;

  selection_wrapper #(.ROWS(ROWS), .COLS(COLS)) u_dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ROWS-1:0] exp_en;
    logic [COLS-1:0] exp_col;
    for (int n = 0; n < 400; n++) begin
      en_r   = 1'($urandom);
      ro_sel = (n % 5 == 0) ? 8'($urandom) : 8'($urandom_range(ROWS - 1));
      foreach (ro_out[r]) ro_out[r] = COLS'($urandom);
      #1;
      exp_en  = '0;
      exp_col = '0;
      if (ro_sel < ROWS) begin
        exp_en[ro_sel] = en_r;
        exp_col        = ro_out[ro_sel];
      end
      checks++;
      if (row_en !== exp_en || col_osc !== exp_col) begin
        failures++;
        $display("FAIL sel=%0d en=%b row_en=%b col=%b expected %b %b", ro_sel, en_r, row_en, col_osc, exp_en, exp_col);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
