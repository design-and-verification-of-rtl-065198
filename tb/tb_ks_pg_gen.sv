// tb_ks_pg_gen: checks the pre-processing stage at its default width (16).
// Random and corner operand pairs are applied; each bit's expected propagate
// (bits differ) and generate (both bits one) are worked out bit by bit.
module tb_ks_pg_gen;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N = 16;
  logic [N-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  ks_pg_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (p[i] !== (a[i] != b[i]) || g[i] !== (a[i] == 1'b1 && b[i] == 1'b1)) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h p=%h g=%h", i, a, b, p, g);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = '1; b = '0; check();
    a = 16'hAAAA; b = 16'hCCCC; check();
    for (int n = 0; n < 2000; n++) begin
      a = N'($urandom); b = N'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
