// tb_bk_preprocess -- self-check of the pre-processing stage (WIDTH = 32).
//
// Random and corner operand pairs are applied. Each bit is checked against
// the column sum a[i] + b[i]: a sum of 1 must give P = 1, G = 0; a sum of 2
// must give P = 0, G = 1; a sum of 0 gives neither. As a whole-word check,
// a + b must equal P + 2*G.
module tb_bk_preprocess;
  localparam int W = 32;
  logic [W-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  bk_preprocess dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [W-1:0] va, logic [W-1:0] vb);
    a = va;
    b = vb;
    #1;
    for (int i = 0; i < W; i++) begin
      int col;
      col = int'(a[i]) + int'(b[i]);
      checks++;
      if (p[i] != (col == 1) || g[i] != (col == 2)) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h p=%b g=%b", i, a, b, p[i], g[i]);
      end
    end
    checks++;
    if ({1'b0, a} + {1'b0, b} != {1'b0, p} + {g, 1'b0}) begin
      failures++;
      $display("FAIL word a=%h b=%h p=%h g=%h", a, b, p, g);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    check_one(32'hAAAA_AAAA, 32'h5555_5555);
    for (int n = 0; n < 200; n++) check_one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
