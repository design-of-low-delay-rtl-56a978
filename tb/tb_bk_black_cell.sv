// tb_bk_black_cell -- exhaustive self-check of the black cell.
//
// All 16 input combinations are applied. The expected group generate is
// "the high group generates, or it propagates and the low group generates",
// worked out with integer arithmetic; the expected group propagate is "both
// groups propagate". A time watchdog ends a hung run as a failure.
module tb_bk_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;

  bk_black_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_g, exp_p;
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      exp_g = (int'(g_hi) + int'(p_hi) * int'(g_lo)) > 0 ? 1 : 0;
      exp_p = int'(p_hi) * int'(p_lo);
      checks += 2;
      if (int'(g_out) != exp_g) begin
        failures++;
        $display("FAIL g_out v=%b got %b exp %0d", v[3:0], g_out, exp_g);
      end
      if (int'(p_out) != exp_p) begin
        failures++;
        $display("FAIL p_out v=%b got %b exp %0d", v[3:0], p_out, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
