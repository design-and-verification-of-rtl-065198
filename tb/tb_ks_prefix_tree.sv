// tb_ks_prefix_tree: checks the Kogge-Stone carry generation network.
// Instances at the default width (16) and at 5 and 3 bits (widths that are not
// powers of two) get random propagate/generate vectors. The expected group
// pair over [i:0] is computed serially, bit by bit from bit 0, which is
// independent of the tree's structure.
module tb_ks_prefix_tree;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] p16, g16, pp16, gg16;
  logic [4:0]  p5, g5, pp5, gg5;
  logic [2:0]  p3, g3, pp3, gg3;
  int checks = 0, failures = 0;

  ks_prefix_tree            u16 (.p(p16), .g(g16), .pp(pp16), .gg(gg16));
  ks_prefix_tree #(.N(5))   u5  (.p(p5),  .g(g5),  .pp(pp5),  .gg(gg5));
  ks_prefix_tree #(.N(3))   u3  (.p(p3),  .g(g3),  .pp(pp3),  .gg(gg3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Serial reference: returns {PP, GG} for a width-n slice held in 16 bits.
  function automatic logic [31:0] serial_ref(logic [15:0] p, logic [15:0] g, int n);
    logic [15:0] rp, rg;
    rp = '0; rg = '0;
    for (int i = 0; i < n; i++) begin
      if (i == 0) begin
        rp[0] = p[0]; rg[0] = g[0];
      end else begin
        rp[i] = p[i] & rp[i-1];
        rg[i] = g[i] | (p[i] & rg[i-1]);
      end
    end
    return {rp, rg};
  endfunction

  task automatic cmp(string tag, logic [15:0] got_p, logic [15:0] got_g,
                     logic [31:0] exp);
    checks++;
    if (got_p !== exp[31:16] || got_g !== exp[15:0]) begin
      failures++;
      $display("FAIL %s pp=%h gg=%h exp pp=%h gg=%h", tag, got_p, got_g,
               exp[31:16], exp[15:0]);
    end
  endtask

  initial begin
    // all propagate with a generate at bit 0: carry must reach the top
    p16 = '1; g16 = 16'h0001; p5 = '1; g5 = 5'b00001; p3 = '1; g3 = 3'b001;
    #1;
    cmp("16", pp16, gg16, serial_ref(p16, g16, 16));
    cmp("5", {11'b0, pp5}, {11'b0, gg5}, serial_ref({11'b0, p5}, {11'b0, g5}, 5));
    cmp("3", {13'b0, pp3}, {13'b0, gg3}, serial_ref({13'b0, p3}, {13'b0, g3}, 3));
    for (int n = 0; n < 5000; n++) begin
      logic [15:0] rp, rg;
      rp = 16'($urandom); rg = 16'($urandom);
      // bias towards long propagate runs
      if (n % 2 == 0) rp = rp | 16'($urandom);
      rg = rg & ~rp;  // p = a^b and g = a&b never both 1
      p16 = rp; g16 = rg;
      p5 = rp[4:0]; g5 = rg[4:0];
      p3 = rp[2:0]; g3 = rg[2:0];
      #1;
      cmp("16", pp16, gg16, serial_ref(p16, g16, 16));
      cmp("5", {11'b0, pp5}, {11'b0, gg5}, serial_ref({11'b0, p5}, {11'b0, g5}, 5));
      cmp("3", {13'b0, pp3}, {13'b0, gg3}, serial_ref({13'b0, p3}, {13'b0, g3}, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
