// tb_ks_adder: checks the Kogge-Stone adder against integer addition.
// The default 16-bit instance gets corner cases and random operands; the 2-,
// 3-, 4- and 5-bit instances (the group sizes used by the carry select adder)
// are checked exhaustively over both operands and carry in.
module tb_ks_adder;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [1:0]  a2, b2, s2;
  logic [2:0]  a3, b3, s3;
  logic [3:0]  a4, b4, s4;
  logic [4:0]  a5, b5, s5;
  logic        ci, co2, co3, co4, co5;
  int checks = 0, failures = 0;

  ks_adder          u16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  ks_adder #(.N(2)) u2  (.a(a2), .b(b2), .cin(ci), .sum(s2), .cout(co2));
  ks_adder #(.N(3)) u3  (.a(a3), .b(b3), .cin(ci), .sum(s3), .cout(co3));
  ks_adder #(.N(4)) u4  (.a(a4), .b(b4), .cin(ci), .sum(s4), .cout(co4));
  ks_adder #(.N(5)) u5  (.a(a5), .b(b5), .cin(ci), .sum(s5), .cout(co5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", tag, got, exp);
    end
  endtask

  task automatic apply16(logic [15:0] a, logic [15:0] b, logic c);
    a16 = a; b16 = b; ci16 = c;
    #1;
    chk("16", int'({co16, s16}), int'(a) + int'(b) + int'(c));
  endtask

  initial begin
    apply16('1, '0, 1'b1);
    apply16('1, '1, 1'b1);
    apply16('0, '0, 1'b0);
    apply16(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 20000; n++)
      apply16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(x); b5 = 5'(y);
          a4 = 4'(x); b4 = 4'(y);
          a3 = 3'(x); b3 = 3'(y);
          a2 = 2'(x); b2 = 2'(y);
          ci = 1'(c);
          #1;
          chk("5", int'({co5, s5}), (x % 32) + (y % 32) + c);
          if (x < 16 && y < 16) chk("4", int'({co4, s4}), x + y + c);
          if (x < 8  && y < 8)  chk("3", int'({co3, s3}), x + y + c);
          if (x < 4  && y < 4)  chk("2", int'({co2, s2}), x + y + c);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
