// tb_brent_kung_adder -- end-to-end self-check of the 32-bit adder at its
// default parameters.
//
// Operands come from directed corner cases, from walking single generates
// and from $urandom. Every result {cout, sum} is compared with a + b + cin
// computed in 33-bit integer arithmetic. The test also measures the longest
// carry chain of each addition (the longest run of bits that a carry enters
// and leaves) and counts how often each mechanism of the adder was exercised:
//   * a carry-in that changes the result (carry-in cell),
//   * a carry-out from the top bit,
//   * a carry chain through all 32 bits (longest path of the tree),
//   * a carry chain crossing a 16-bit half (down-sweep gray cells),
//   * additions with no carry at all.
// Each counter must end above zero. A time watchdog ends a hung run.
module tb_brent_kung_adder;
  localparam int W = 32;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_cin_used = 0, n_cout = 0, n_full_chain = 0, n_cross_half = 0, n_no_carry = 0;

  brent_kung_adder dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Longest run of consecutive bits whose carry-out is set, the carry-in
  // counting as the carry into bit 0.
  function automatic int longest_chain(logic [W-1:0] va, logic [W-1:0] vb, logic vcin);
    int best = 0, run = 0, carry = int'(vcin);
    for (int i = 0; i < W; i++) begin
      carry = (int'(va[i]) + int'(vb[i]) + carry) / 2;
      run   = (carry != 0) ? run + 1 : 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic check_one(logic [W-1:0] va, logic [W-1:0] vb, logic vcin);
    logic [W:0] expected, without_cin;
    int chain;
    a = va; b = vb; cin = vcin;
    #1;
    expected    = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    without_cin = {1'b0, a} + {1'b0, b};
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %b_%h", a, b, cin, cout, sum,
               expected[W], expected[W-1:0]);
    end
    chain = longest_chain(a, b, cin);
    if (cin && expected != without_cin) n_cin_used++;
    if (expected[W])                   n_cout++;
    if (chain == W)                    n_full_chain++;
    if (chain > W / 2)                 n_cross_half++;
    if (chain == 0)                    n_no_carry++;
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("mechanism %-28s exercised %0d times", what, count);
    end
  endtask

  initial begin
    check_one('0, '0, 1'b0);
    check_one('1, '0, 1'b1);                       // carry-in travels all 32 bits
    check_one('1, 32'h1, 1'b0);                    // bit-0 generate travels to cout
    check_one('1, '1, 1'b1);
    check_one(32'h8000_0000, 32'h8000_0000, 1'b0);
    check_one(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    check_one(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    for (int k = 0; k < W; k++) begin
      check_one(~(32'h1 << k), 32'h1 << k, 1'b1);  // propagate everywhere
      check_one(32'h1 << k, 32'h1 << k, 1'b0);     // single generate
    end
    for (int n = 0; n < 5000; n++) check_one($urandom, $urandom, 1'($urandom));
    require("carry-in used", n_cin_used);
    require("carry-out", n_cout);
    require("full 32-bit carry chain", n_full_chain);
    require("carry chain over 16 bits", n_cross_half);
    require("no carry", n_no_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
