// tb_masked_ks_adder: streams one random sharing per cycle through the
// masked Kogge-Stone adder and checks, LAT = 1 + log2(W) cycles later, the
// recombined sum and carry out against x + y + cin. Also checks that
// valid_o follows valid_i by exactly LAT cycles.
// A Kogge-Stone tree of DOM AND gates follows the document; register
// placement, latency and randomness budget are this design's.
module tb_masked_ks_adder;
  import snn_pkg::*;
  localparam int W   = 16;
  localparam int RND = ks_rnd_bits(W);
  localparam int LAT = ks_levels(W) + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic           vi = 0, vo, cin = 0, co0, co1;
  logic [W-1:0]   x0 = 0, x1 = 0, y0 = 0, y1 = 0, s0, s1;
  logic [RND-1:0] rnd = '0;
  masked_ks_adder #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vi),
    .x0_i(x0), .x1_i(x1), .y0_i(y0), .y1_i(y1), .cin_i(cin), .rnd_i(rnd),
    .valid_o(vo), .s0_o(s0), .s1_o(s1), .co0_o(co0), .co1_o(co1));
  int checks = 0, failures = 0;
  logic [W:0] expq [$];
  int         vcnt [$];
  int         cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // randomness changes every cycle
  always @(negedge clk) for (int i = 0; i < RND; i += 32) rnd[i +: 32] = $urandom;
  // checker
  always @(negedge clk) if (rst_n && vo) begin
    logic [W:0] e;
    int t;
    e = expq.pop_front();
    t = vcnt.pop_front();
    checks++;
    if ({co0 ^ co1, s0 ^ s1} !== e) begin
      failures++;
      $display("FAIL: got %h exp %h", {co0 ^ co1, s0 ^ s1}, e);
    end
    checks++;
    if (cyc - t != LAT) begin failures++; $display("FAIL: latency %0d", cyc - t); end
  end
  initial begin
    logic [W-1:0] x, y;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      vi = ($urandom_range(0, 3) != 0);
      x = W'($urandom); y = W'($urandom);
      if (i % 7 == 0) begin x = '1; y = 0; end  // long carry chain
      x1 = W'($urandom); y1 = W'($urandom);
      x0 = x ^ x1; y0 = y ^ y1;
      cin = $urandom_range(0, 1);
      if (vi) begin
        expq.push_back({1'b0, x} + {1'b0, y} + (W+1)'(cin));
        vcnt.push_back(cyc);
      end
    end
    @(negedge clk); vi = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
