// tb_ks_sum_gen: checks the post-processing stage at its default width (16).
// For random operands the testbench forms bit propagate and the group pairs
// over [i:0] serially, feeds them in with a random carry in, and compares the
// sum and carry out with the integer sum a + b + cin.
module tb_ks_sum_gen;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N = 16;
  logic [N-1:0] p, pp, gg, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ks_sum_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] a, logic [N-1:0] b, logic ci);
    logic [N:0] exp;
    logic [N-1:0] g;
    g = a & b;
    p = a ^ b;
    for (int i = 0; i < N; i++) begin
      pp[i] = (i == 0) ? p[0] : p[i] & pp[i-1];
      gg[i] = (i == 0) ? g[0] : g[i] | (p[i] & gg[i-1]);
    end
    cin = ci;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (N+1)'(ci);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", a, b, ci, cout, sum, exp);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b1);
    apply(16'hAAAA, 16'hCCCC, 1'b0);
    for (int n = 0; n < 5000; n++)
      apply(N'($urandom), N'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
