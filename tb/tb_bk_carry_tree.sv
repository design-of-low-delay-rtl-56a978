// tb_bk_carry_tree -- self-check of the Brent-Kung carry generation stage.
//
// Two trees are tested, the 32-bit default and a 16-bit one, on the same
// stimulus. Inputs are derived from random operands (G = a & b, P = a ^ b)
// and, to stress every cell, also drawn fully at random. Every carry is
// compared with a reference computed by rippling c[i] = g[i] | p[i] & c[i-1]
// from the carry-in, one bit at a time. Corner cases include a carry that
// travels through all 32 bits.
module tb_bk_carry_tree;
  logic [31:0] g, p, c32;
  logic [15:0] c16;
  logic        cin;
  int checks = 0, failures = 0;

  bk_carry_tree                  dut32 (.g(g),       .p(p),       .cin(cin), .c(c32));
  bk_carry_tree #(.WIDTH(16))    dut16 (.g(g[15:0]), .p(p[15:0]), .cin(cin), .c(c16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ripple(logic [31:0] vg, logic [31:0] vp, logic vcin, int w);
    logic [31:0] r = '0;
    logic carry = vcin;
    for (int i = 0; i < w; i++) begin
      carry = vg[i] | (vp[i] & carry);
      r[i] = carry;
    end
    return r;
  endfunction

  task automatic check_one(logic [31:0] vg, logic [31:0] vp, logic vcin);
    logic [31:0] e32, e16;
    g = vg; p = vp; cin = vcin;
    #1;
    e32 = ripple(g, p, cin, 32);
    e16 = ripple(g, p, cin, 16);
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (c32[i] != e32[i]) begin
        failures++;
        $display("FAIL w32 bit %0d g=%h p=%h cin=%b c=%h exp=%h", i, g, p, cin, c32, e32);
      end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (c16[i] != e16[i]) begin
        failures++;
        $display("FAIL w16 bit %0d g=%h p=%h cin=%b c=%h exp=%h", i, g[15:0], p[15:0], cin, c16, e16[15:0]);
      end
    end
  endtask

  initial begin
    check_one('0, '1, 1'b1);            // carry-in ripples through every bit
    check_one(32'h1, 32'hFFFF_FFFE, 1'b0);
    check_one('0, '1, 1'b0);
    check_one('1, '0, 1'b0);
    for (int k = 0; k < 32; k++) check_one(32'h1 << k, '1, 1'b0);
    for (int n = 0; n < 400; n++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      check_one(a & b, a ^ b, 1'($urandom));
      check_one($urandom, $urandom, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
