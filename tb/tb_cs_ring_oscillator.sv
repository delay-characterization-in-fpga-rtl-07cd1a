// tb_cs_ring_oscillator: checks the single long ring oscillator model.
//
// Three rings (31 and 63 stages at 210 ps, and 5 stages at 100 ps) are
// enabled, disabled and re-enabled. Disabled, a ring must hold its output
// at 1; enabled, its period must be 2 x stages x stage delay.
module tb_cs_ring_oscillator;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 3;
  localparam int STAGES[N] = '{31, 63, 5};
  localparam int DLY[N]    = '{210, 210, 100};

  logic        en = 1'b0;
  logic [N-1:0] ro;
  int          checks = 0, failures = 0;

  cs_ring_oscillator #(.STAGES(31), .STAGE_DELAY_PS(210)) u_r31 (.en(en), .ro_out(ro[0]));
  cs_ring_oscillator #(.STAGES(63), .STAGE_DELAY_PS(210)) u_r63 (.en(en), .ro_out(ro[1]));
  cs_ring_oscillator #(.STAGES(5),  .STAGE_DELAY_PS(100)) u_r5  (.en(en), .ro_out(ro[2]));

  int  edges[N];
  time first_t[N], last_t[N];

  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge ro[i]) begin
      if (edges[i] == 0) first_t[i] = $time;
      last_t[i] = $time;
      edges[i]++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int i = 0; i < N; i++) edges[i] = 0;  // drop the power-up edge
    #50_000;
    for (int i = 0; i < N; i++) begin
      check(ro[i] === 1'b1, $sformatf("ring %0d idle output 1", i));
      check(edges[i] == 0, $sformatf("ring %0d idle, no edges", i));
    end
    for (int run = 0; run < 2; run++) begin
      for (int i = 0; i < N; i++) edges[i] = 0;
      en = 1'b1;
      #2_000_000;
      en = 1'b0;
      #50_000;
      for (int i = 0; i < N; i++) begin
        int  per;
        int  expp;
        per  = int'((last_t[i] - first_t[i]) / (edges[i] - 1));
        expp = 2 * STAGES[i] * DLY[i];
        check(edges[i] > 10, $sformatf("run %0d ring %0d oscillates (%0d edges)", run, i, edges[i]));
        check(per == expp, $sformatf("run %0d ring %0d period %0d ps, expected %0d", run, i, per, expp));
        check(ro[i] === 1'b1, $sformatf("run %0d ring %0d stops at 1", run, i));
      end
      begin
        int snap[N];
        for (int i = 0; i < N; i++) snap[i] = edges[i];
        #200_000;
        for (int i = 0; i < N; i++)
          check(edges[i] == snap[i], $sformatf("run %0d ring %0d stays stopped", run, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
