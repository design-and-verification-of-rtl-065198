// tb_ks_carry_op: exhaustive check of the prefix carry operator.
// All 16 input combinations are applied; the expected group pair is worked out
// from the meaning of the operator: the joined span generates if the upper
// span generates, or it propagates and the lower span generates; it propagates
// only if both spans propagate.
module tb_ks_carry_op;
  timeunit 1ns; timeprecision 1ps;

  logic p_hi, g_hi, p_lo, g_lo, p_out, g_out;
  int checks = 0, failures = 0;

  ks_carry_op dut (.*);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_p, exp_g;
      {p_hi, g_hi, p_lo, g_lo} = 4'(v);
      #1;
      exp_p = (p_hi && p_lo);
      exp_g = g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0);
      checks += 2;
      if (p_out !== exp_p) begin
        failures++;
        $display("FAIL p: in=%b got %b exp %b", 4'(v), p_out, exp_p);
      end
      if (g_out !== exp_g) begin
        failures++;
        $display("FAIL g: in=%b got %b exp %b", 4'(v), g_out, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
