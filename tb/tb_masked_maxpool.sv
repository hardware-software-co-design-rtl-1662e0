// tb_masked_maxpool: pooling windows of 1 to 9 Boolean-shared non-negative
// values, with repeated values; checks the recombined maximum after each
// window and the update latency of ks_levels(W) + 4 cycles.
// Masked comparator plus masked multiplexer follows the document; the
// timing checked is this design's.
module tb_masked_maxpool;
  import snn_pkg::*;
  localparam int W = 16;
  localparam int RND = ks_rnd_bits(W) + W;
  localparam int L = ks_levels(W);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic vi = 0, first = 0, busy, done;
  logic [W-1:0] v0 = 0, v1 = 0, m0, m1;
  logic [RND-1:0] rnd = '0;
  masked_maxpool #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vi),
    .first_i(first), .v0_i(v0), .v1_i(v1), .rnd_i(rnd), .busy_o(busy),
    .done_o(done), .max0_o(m0), .max1_o(m1));
  always @(negedge clk) for (int i = 0; i < RND; i += 32) rnd[i +: 32] = $urandom;
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] v [9], best;
    int n, lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 100; g++) begin
      n = $urandom_range(1, 9);
      for (int i = 0; i < n; i++) begin
        v[i] = W'($urandom_range(0, 2**(W-1) - 1));
        if (i > 0 && $urandom_range(0, 3) == 0) v[i] = v[i-1];
        if (i == 0 || v[i] > best) best = v[i];
      end
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        vi = 1; first = (i == 0); v1 = W'($urandom); v0 = v[i] ^ v1;
        @(negedge clk);
        vi = 0; lat = 1;
        while (!done) begin @(negedge clk); lat++; end
        checks++;
        if (lat != ((i == 0) ? 1 : L + 4)) begin failures++; $display("FAIL: latency %0d", lat); end
      end
      checks++;
      if ((m0 ^ m1) !== best) begin failures++; $display("FAIL: %h exp %h", m0 ^ m1, best); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
