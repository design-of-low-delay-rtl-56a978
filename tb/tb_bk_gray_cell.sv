// tb_bk_gray_cell -- exhaustive self-check of the gray cell.
//
// All 8 input combinations are applied and the carry output is compared with
// "the high group generates, or it propagates and the low carry is set",
// worked out with integer arithmetic. A time watchdog ends a hung run.
module tb_bk_gray_cell;
  logic g_hi, p_hi, g_lo, g_out;
  int checks = 0, failures = 0;

  bk_gray_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_g;
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      exp_g = (int'(g_hi) + int'(p_hi) * int'(g_lo)) > 0 ? 1 : 0;
      checks++;
      if (int'(g_out) != exp_g) begin
        failures++;
        $display("FAIL v=%b got %b exp %0d", v[2:0], g_out, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
