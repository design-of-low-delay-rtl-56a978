// tb_bk_cin_cell -- exhaustive self-check of the bit-0 carry-in cell.
//
// For every operand bit pair (a0, b0) and carry-in, the cell is fed
// G0 = a0 & b0 and P0 = a0 ^ b0 and its output must equal the carry of the
// one-bit sum a0 + b0 + cin, worked out with integer arithmetic.
module tb_bk_cin_cell;
  logic g0, p0, cin, c0;
  int checks = 0, failures = 0;

  bk_cin_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic a0, b0;
      int exp_c;
      {a0, b0, cin} = 3'(v);
      g0 = a0 & b0;
      p0 = a0 ^ b0;
      #1;
      exp_c = (int'(a0) + int'(b0) + int'(cin)) / 2;
      checks++;
      if (int'(c0) != exp_c) begin
        failures++;
        $display("FAIL a0=%b b0=%b cin=%b got %b exp %0d", a0, b0, cin, c0, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
