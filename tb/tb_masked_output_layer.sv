// tb_masked_output_layer: feeds groups of arithmetically shared scores and
// checks the recombined maximum and class against a reference that does
// the two-phase search literally (largest score below K/2; if none, the
// global maximum; earlier class wins ties). Groups with no score below K/2
// and groups with ties are included. Also checks the processing time of a
// score: ks_levels(W)+2 cycles for the first, 2*ks_levels(W)+6 after.
// The thresholded maximum follows the document; the one-pass key
// comparison, the tie rule and the timing are this design's.
module tb_masked_output_layer;
  import snn_pkg::*;
  localparam int W = 16, CW = 8;
  localparam int RND = ks_rnd_bits(W) + W + CW;
  localparam int L = ks_levels(W);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic           vi = 0, first = 0, busy, done;
  logic [W-1:0]   sc0 = 0, sc1 = 0, m0, m1;
  logic [CW-1:0]  c0, c1;
  logic [RND-1:0] rnd = '0;
  masked_output_layer #(.W(W), .CW(CW)) dut (.clk_i(clk), .rst_ni(rst_n),
    .valid_i(vi), .first_i(first), .sc0_i(sc0), .sc1_i(sc1), .rnd_i(rnd),
    .busy_o(busy), .done_o(done), .max0_o(m0), .max1_o(m1), .cls0_o(c0), .cls1_o(c1));
  always @(negedge clk) for (int i = 0; i < RND; i += 32) rnd[i +: 32] = $urandom;
  int checks = 0, failures = 0, phase2 = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic send(input logic [W-1:0] s, input bit f, output int lat);
    @(negedge clk);
    vi = 1; first = f; sc1 = W'($urandom); sc0 = s - sc1;
    @(negedge clk);
    vi = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask
  initial begin
    logic [W-1:0] sc [10];
    int n, lat, ecls, bcls;
    logic [W-1:0] escore, best;
    bit found;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      n = $urandom_range(1, 10);
      for (int i = 0; i < n; i++) begin
        sc[i] = W'($urandom);
        if (g % 3 == 1) sc[i][W-1] = 1'b1;                 // none below K/2
        if (g % 3 == 2 && i > 0 && $urandom_range(0, 2) == 0) sc[i] = sc[0]; // ties
      end
      // reference: phase 1 then phase 2
      found = 0;
      for (int i = 0; i < n; i++)
        if (!sc[i][W-1] && (!found || sc[i] > best)) begin found = 1; best = sc[i]; bcls = i; end
      if (!found) begin
        phase2++;
        for (int i = 0; i < n; i++)
          if (i == 0 || sc[i] > best) begin best = sc[i]; bcls = i; end
      end
      escore = best; ecls = bcls;
      for (int i = 0; i < n; i++) begin
        send(sc[i], i == 0, lat);
        checks++;
        if (lat != ((i == 0) ? L + 2 : 2 * L + 6)) begin
          failures++; $display("FAIL: latency %0d for score %0d", lat, i);
        end
      end
      checks += 2;
      if ((m0 ^ m1) !== escore) begin failures++; $display("FAIL g%0d: score %h exp %h", g, m0 ^ m1, escore); end
      if ((c0 ^ c1) !== CW'(ecls)) begin failures++; $display("FAIL g%0d: class %0d exp %0d", g, c0 ^ c1, ecls); end
    end
    checks++;
    if (phase2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
