// tb_ro_array: checks the ring oscillator array model.
//
// A 3 x 4 array with the spatial variation on and one aged CLB. Each row is
// enabled alone; every oscillator of that row must run with the period
// worked out here from the loop delay, its variation offset
// ((7 r + 13 c) mod 17) x 10 ps and the ageing offset, and every oscillator
// of the other rows must stay still.
module tb_ro_array;
  timeunit 1ps; timeprecision 1ps;

  localparam int ROWS = 3, COLS = 4;
  localparam int AR = 2, AC = 1, APS = 500;
  localparam int LOOP6 = 8 * 86 + 2545 + 117;

  logic [ROWS-1:0] row_en;
  logic [4:0]      tc;
  logic [COLS-1:0] ro_out [ROWS];
  int              edges [ROWS][COLS];
  realtime         last [ROWS][COLS], per [ROWS][COLS];
  int              checks = 0, failures = 0;

  ro_array #(.ROWS(ROWS), .COLS(COLS), .LOOP_PIN(6), .VARIATION(1'b1),
             .AGED_ROW(AR), .AGED_COL(AC), .AGED_PS(APS))
    u_dut (.row_en(row_en), .test_case(tc), .ro_out(ro_out));

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      always @(posedge ro_out[r][c]) begin
        edges[r][c]++;
        per[r][c]  = $realtime - last[r][c];
        last[r][c] = $realtime;
      end
    end
  end

  function automatic int expected_period(int r, int c);
    int extra = ((r * 7 + c * 13) % 17) * 10;
    if (r == AR && c == AC) extra += APS;
    return 2 * (LOOP6 + extra);
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int snap [ROWS][COLS];
    row_en = '0;
    tc     = 5'd31;
    foreach (edges[r, c]) edges[r][c] = 0;
    #20_000;
    for (int sel = 0; sel < ROWS; sel++) begin
      snap = edges;
      row_en = ROWS'(1) << sel;
      #300_000;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (r == sel) begin
            if (per[r][c] != realtime'(expected_period(r, c))) begin
              failures++;
              $display("FAIL row %0d col %0d period %0t expected %0d", r, c, per[r][c], expected_period(r, c));
            end
          end else if (edges[r][c] != snap[r][c]) begin
            failures++;
            $display("FAIL row %0d col %0d ran while row %0d was selected", r, c, sel);
          end
        end
      row_en = '0;
      #50_000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
