// tb_b2a_bit: random Boolean sharings of a bit go in every cycle; two
// cycles later the arithmetic shares must add up (mod 2**W) to the bit, and
// share 1 must not be constant (it carries the fresh mask).
// That XNOR bits are converted from Boolean to arithmetic shares follows
// the document; the conversion formula and its latency are this design's
// own.
module tb_b2a_bit;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         vi = 0, vo, b0 = 0, b1 = 0;
  logic [W:0]   rnd = 0;
  logic [W-1:0] a0, a1;
  b2a_bit #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vi), .b0_i(b0),
    .b1_i(b1), .rnd_i(rnd), .valid_o(vo), .a0_o(a0), .a1_o(a1));
  int checks = 0, failures = 0, cyc = 0, a1_changes = 0;
  logic [W-1:0] a1_prev = 0;
  bit expq [$];
  int tq [$];
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) if (rst_n && vo) begin
    bit e; int t;
    e = expq.pop_front(); t = tq.pop_front();
    checks += 2;
    if (W'(a0 + a1) !== W'(e)) begin failures++; $display("FAIL: %h+%h exp %b", a0, a1, e); end
    if (cyc - t != 2) begin failures++; $display("FAIL: latency %0d", cyc - t); end
    if (a1 != a1_prev) a1_changes++;
    a1_prev <= a1;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      vi = $urandom_range(0, 1);
      b0 = $urandom_range(0, 1); b1 = $urandom_range(0, 1);
      rnd = (W+1)'({$urandom, $urandom});
      if (vi) begin expq.push_back(b0 ^ b1); tq.push_back(cyc); end
    end
    @(negedge clk); vi = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (a1_changes < 100) begin failures++; $display("FAIL: share 1 not randomised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
