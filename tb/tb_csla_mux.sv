// tb_csla_mux: exhaustive check of the 6:3 multiplexer (default W = 3):
// with s = 0 the output is d0, with s = 1 it is d1.
module tb_csla_mux;
  timeunit 1ns; timeprecision 1ps;

  logic [2:0] d0, d1, y;
  logic       s;
  int checks = 0, failures = 0;

  csla_mux dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic [2:0] exp;
      {s, d1, d0} = 7'(v);
      #1;
      exp = (v >= 64) ? 3'(v >> 3) : 3'(v);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL s=%b d1=%b d0=%b y=%b exp %b", s, d1, d0, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
