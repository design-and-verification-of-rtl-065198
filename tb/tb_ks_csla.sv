// tb_ks_csla: end-to-end test of the 16-bit Kogge-Stone carry select adder at
// its default parameters.
//
// Operands come from directed cases (zeros, all ones, a carry that must travel
// from cin through every group, the operand patterns 0x0000/0x0000,
// 0xAAAA/0xCCCC and 0xEEEE/0xDDDD with both carry-in values) and from random
// draws, including draws biased to make long propagate runs. Each result is
// compared with the integer sum a + b + cin.
//
// The design's one mechanism is carry selection: each of the four select
// groups (bits [3:2], [6:4], [10:7], [15:11]) must be seen passing its
// carry-in-0 word (adder output) and its carry-in-1 word (BEC output). The
// carry into each group is worked out here from the integer sum of the lower
// bits, and the testbench counts both cases per group, plus carry-in and
// carry-out events and the full chain where cin ripples through every group;
// a mechanism never seen counts as a failure.
module tb_ks_csla;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  // Lowest bit of each carry select group (groups of 2, 2, 3, 4, 5 bits).
  localparam int GRP_LSB [4] = '{2, 4, 7, 11};

  int sel0_seen [4];
  int sel1_seen [4];
  int cin_seen, cout_seen, full_chain_seen;

  ks_csla dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] x, logic [15:0] y, logic c);
    int exp;
    a = x; b = y; cin = c;
    #1;
    exp = int'(x) + int'(y) + int'(c);
    checks++;
    if (int'({cout, sum}) != exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %0h", x, y, c, cout, sum, exp);
    end
    // carry into group k = bit LSB of the sum of the operand bits below it
    for (int k = 0; k < 4; k++) begin
      int lsb, mask, low;
      lsb  = GRP_LSB[k];
      mask = (1 << lsb) - 1;
      low  = (int'(x) & mask) + (int'(y) & mask) + int'(c);
      if (((low >> lsb) & 1) == 1) sel1_seen[k]++;
      else                         sel0_seen[k]++;
    end
    if (c) cin_seen++;
    if (exp >= 65536) cout_seen++;
    if (c && ((x ^ y) == 16'hFFFF)) full_chain_seen++;
  endtask

  initial begin
    foreach (sel0_seen[k]) begin sel0_seen[k] = 0; sel1_seen[k] = 0; end
    cin_seen = 0; cout_seen = 0; full_chain_seen = 0;

    for (int c = 0; c < 2; c++) begin
      apply(16'h0000, 16'h0000, 1'(c));
      apply(16'hAAAA, 16'hCCCC, 1'(c));
      apply(16'hEEEE, 16'hDDDD, 1'(c));
      apply(16'hFFFF, 16'hFFFF, 1'(c));
      apply(16'hFFFF, 16'h0000, 1'(c));
      apply(16'h5555, 16'hAAAA, 1'(c));
    end
    // single bit carries into every bit position
    for (int i = 0; i < 16; i++) begin
      apply(16'(1 << i), 16'(1 << i), 1'b0);
      apply(16'hFFFF >> (15 - i), 16'h0001, 1'b0);
    end
    for (int n = 0; n < 200000; n++) begin
      logic [15:0] x, y;
      x = 16'($urandom);
      y = 16'($urandom);
      if (n % 4 == 1) y = ~x ^ 16'(1 << ($urandom % 16));  // long propagate runs
      if (n % 4 == 2) y = ~x;                               // all propagate
      apply(x, y, 1'($urandom));
    end

    for (int k = 0; k < 4; k++) begin
      $display("group at bit %0d: carry-in-0 word selected %0d times, carry-in-1 word %0d times",
               GRP_LSB[k], sel0_seen[k], sel1_seen[k]);
      checks += 2;
      if (sel0_seen[k] == 0) failures++;
      if (sel1_seen[k] == 0) failures++;
    end
    $display("cin=1: %0d, cout=1: %0d, carry through all groups: %0d",
             cin_seen, cout_seen, full_chain_seen);
    checks += 3;
    if (cin_seen == 0) failures++;
    if (cout_seen == 0) failures++;
    if (full_chain_seen == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
