// tb_bk_postprocess -- self-check of the post-processing (sum) stage.
//
// Random propagate vectors, carry vectors and carry-ins are applied. The
// expected sum bit i is the parity of P[i] plus the carry entering bit i
// (the carry-in for bit 0, c[i-1] above), worked out bit by bit with integer
// arithmetic; the expected carry-out is c[31].
module tb_bk_postprocess;
  localparam int W = 32;
  logic [W-1:0] p, c, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  bk_postprocess dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      p   = $urandom;
      c   = $urandom;
      cin = 1'($urandom);
      if (n == 0) begin p = '0; c = '0; cin = 1'b1; end
      if (n == 1) begin p = '1; c = '0; cin = 1'b0; end
      #1;
      for (int i = 0; i < W; i++) begin
        int carry_in;
        carry_in = (i == 0) ? int'(cin) : int'(c[i-1]);
        checks++;
        if (int'(sum[i]) != (int'(p[i]) + carry_in) % 2) begin
          failures++;
          $display("FAIL bit %0d p=%h c=%h cin=%b sum=%h", i, p, c, cin, sum);
        end
      end
      checks++;
      if (cout != c[W-1]) begin
        failures++;
        $display("FAIL cout c=%h cout=%b", c, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
