// tb_lut6: exhaustive check of the six-input lookup table.
//
// One instance keeps the default truth table (6-input XOR) and must output
// the parity of its address; a second holds an arbitrary table and must
// return the addressed bit. All 64 addresses are applied to both.
module tb_lut6;
  timeunit 1ns; timeprecision 1ps;

  localparam logic [63:0] ODD_INIT = 64'hF00D_1234_8BAD_C0DE;

  logic [5:0] a;
  logic       o_xor, o_any;
  int         checks = 0, failures = 0;

  lut6 u_xor (.a(a), .o(o_xor));
  lut6 #(.INIT(ODD_INIT)) u_any (.a(a), .o(o_any));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = 6'(i);
      #1;
      checks++;
      if (o_xor !== 1'(($countones(i)) % 2)) begin
        failures++;
        $display("xor lut: a=%0d o=%b", i, o_xor);
      end
      checks++;
      if (o_any !== ODD_INIT[i]) begin
        failures++;
        $display("table lut: a=%0d o=%b", i, o_any);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
