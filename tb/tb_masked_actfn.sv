// tb_masked_actfn: streams random arithmetic sharings of sums into the
// masked sign activation and checks the recombined output bit against
// "sum below half the modulus", and the latency of ks_levels(W) + 2 cycles.
// The MSB threshold and the masked Kogge-Stone carry follow the document;
// the latency checked is that of this design's pipeline.
module tb_masked_actfn;
  import snn_pkg::*;
  localparam int W   = 16;
  localparam int RND = ks_rnd_bits(W);
  localparam int LAT = ks_levels(W) + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic           vi = 0, vo, a0, a1;
  logic [W-1:0]   s0 = 0, s1 = 0;
  logic [RND-1:0] rnd = '0;
  masked_actfn #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vi),
    .s0_i(s0), .s1_i(s1), .rnd_i(rnd), .valid_o(vo), .act0_o(a0), .act1_o(a1));
  int checks = 0, failures = 0, ones = 0, cyc = 0;
  bit expq [$];
  int tq [$];
  always @(posedge clk) cyc++;
  always @(negedge clk) for (int i = 0; i < RND; i += 32) rnd[i +: 32] = $urandom;
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
    if ((a0 ^ a1) !== e) begin failures++; $display("FAIL: act %b exp %b", a0 ^ a1, e); end
    if (cyc - t != LAT) begin failures++; $display("FAIL: latency %0d", cyc - t); end
    ones += e;
  end
  initial begin
    logic [W-1:0] s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      vi = $urandom_range(0, 1);
      s = W'($urandom);
      if (i % 10 == 0) s = 16'h7FFF;
      if (i % 10 == 1) s = 16'h8000;
      s1 = W'($urandom);
      s0 = s - s1;
      if (vi) begin expq.push_back(~s[W-1]); tq.push_back(cyc); end
    end
    @(negedge clk); vi = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (ones == 0 || expq.size() != 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
