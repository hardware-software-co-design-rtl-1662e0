// tb_dom_and: random test of the DOM AND gadget.
// Feeds a new random sharing every cycle and checks one cycle later that
// the output shares recombine to the AND of the recombined inputs, and that
// share 0 alone does not simply equal the product (the masks are fresh).
// The gate follows the document's DOM AND figure; its one-cycle latency
// follows from registering every product.
module tb_dom_and;
  localparam int W = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [W-1:0] a0, a1, b0, b1, r, q0, q1;
  dom_and #(.W(W)) dut (.clk_i(clk), .a0_i(a0), .a1_i(a1), .b0_i(b0), .b1_i(b1),
                        .r_i(r), .q0_o(q0), .q1_o(q1));
  int checks = 0, failures = 0, differ = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] exp_q;
    {a0, a1, b0, b1, r} = '0;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      a0 = W'($urandom); a1 = W'($urandom); b0 = W'($urandom); b1 = W'($urandom);
      r = W'($urandom);
      exp_q = (a0 ^ a1) & (b0 ^ b1);
      @(negedge clk);
      checks++;
      if ((q0 ^ q1) !== exp_q) begin
        failures++;
        $display("FAIL %0d: got %h exp %h", i, q0 ^ q1, exp_q);
      end
      if (q0 != exp_q) differ++;
    end
    checks++;
    if (differ < 400) begin failures++; $display("FAIL: share 0 follows the product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
