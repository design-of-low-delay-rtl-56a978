// tb_brent_kung_adder16 -- self-check of the 16-bit configuration of the
// adder (WIDTH = 16), exhaustive over one operand's low byte and random
// elsewhere. {cout, sum} is compared with a + b + cin in 17-bit integer
// arithmetic; a full 16-bit carry chain and a carry-out must occur.
module tb_brent_kung_adder16;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0, n_full_chain = 0, n_cout = 0;

  brent_kung_adder #(.WIDTH(W)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [W-1:0] va, logic [W-1:0] vb, logic vcin);
    logic [W:0] expected;
    a = va; b = vb; cin = vcin;
    #1;
    expected = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %b_%h", a, b, cin, cout, sum,
               expected[W], expected[W-1:0]);
    end
    if ((a ^ b) == '1 && cin) n_full_chain++;
    if (expected[W]) n_cout++;
  endtask

  initial begin
    check_one('1, '0, 1'b1);
    for (int x = 0; x < 256; x++)
      for (int n = 0; n < 8; n++) check_one(16'(x), 16'($urandom), 1'($urandom));
    for (int n = 0; n < 2000; n++) check_one(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (n_full_chain == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL full chain %0d, carry-out %0d", n_full_chain, n_cout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
