// tb_bec: exhaustive check of the binary to excess-1 converter at its default
// width (3 bits) and at 6 bits (the widest converter of the 16-bit adder):
// the output must equal the input plus one, modulo 2^N.
module tb_bec;
  timeunit 1ns; timeprecision 1ps;

  logic [2:0] b3, x3;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;

  bec          u3 (.b(b3), .x(x3));
  bec #(.N(6)) u6 (.b(b6), .x(x6));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      b6 = 6'(v);
      b3 = 3'(v);
      #1;
      checks++;
      if (int'(x6) != (v + 1) % 64) begin
        failures++;
        $display("FAIL N=6 b=%0d x=%0d", v, x6);
      end
      if (v < 8) begin
        checks++;
        if (int'(x3) != (v + 1) % 8) begin
          failures++;
          $display("FAIL N=3 b=%0d x=%0d", v, x3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
