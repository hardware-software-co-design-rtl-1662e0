// tb_masked_qconv_unit: self-checking test of the masked 8-bit
// convolution / ReLU / maxpool datapath.
//
// Random pooling windows of 1 to 4 convolutions, each of 1 to 25 random
// signed 8-bit pixel/weight products plus a random bias, some chosen so
// that sums wrap to the negative half. In half of the windows the inputs
// are previous-layer activations given as random Boolean shares (the B2A
// path) instead of pixels. The reference computes each sum
// mod 2**16, applies ReLU (zero at or above half the modulus) and takes
// the window maximum; the XOR of the two output shares must equal it.
// Also checks that the shares are not the plain value every time, and
// the latency from conv_end_i to pool_done_o: ks_levels(W) + 3 cycles
// for the first convolution of a window, 2*ks_levels(W) + 6 for the others.
// The masked convolution, ReLU and maxpool dataflow follows the document;
// the port protocol and timing are this design's.
module tb_masked_qconv_unit;
  import snn_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned L = ks_levels(W);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start = 0, valid = 0, conv_end = 0, pool_first = 0;
  logic [W-1:0] bias = 0;
  logic [7:0]   pix = 0, wgt = 0;
  logic         prev = 0;
  logic [W-1:0] act0 = 0, act1 = 0;
  logic         ready, done;
  logic [W-1:0] max0, max1;

  masked_qconv_unit #(.W(W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .bias_i(bias), .valid_i(valid),
    .pix_i(pix), .prev_i(prev), .act0_i(act0), .act1_i(act1), .wgt_i(wgt), .conv_end_i(conv_end), .pool_first_i(pool_first),
    .ready_o(ready), .pool_done_o(done), .max0_o(max0), .max1_o(max1)
  );

  int checks = 0, failures = 0, masked_seen = 0, relu_zero = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] s, relu, best, b;
    logic [7:0]   p, w;
    logic [W-1:0] x, m;
    int           ntap, nconv, lat, big, prev_windows = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int win = 0; win < 150; win++) begin
      nconv = $urandom_range(1, 4);
      big   = $urandom_range(0, 1);
      prev  = $urandom_range(0, 1);
      if (prev) prev_windows++;
      best  = 0;
      for (int c = 0; c < nconv; c++) begin
        while (!ready) @(negedge clk);
        b = W'($urandom);
        s = b;
        bias = b; start = 1;
        @(negedge clk);
        start = 0;
        ntap = $urandom_range(1, 25);
        for (int t = 0; t < ntap; t++) begin
          p = 8'($urandom); w = 8'($urandom);
          if (!big) begin p = 8'($urandom_range(0, 15)); w = 8'($urandom_range(0, 15)); end
          x = prev ? W'($urandom_range(0, big ? 32767 : 255)) : W'({{8{p[7]}}, p});
          m = W'($urandom);
          pix = p; wgt = w; valid = 1; act0 = m; act1 = x ^ m;
          s += x * W'({{8{w[7]}}, w});
          @(negedge clk);
        end
        valid = 0;
        while (!ready) @(negedge clk);
        conv_end = 1; pool_first = (c == 0);
        relu = s[W-1] ? '0 : s;
        if (relu == 0) relu_zero++;
        if (c == 0 || relu > best) best = relu;
        @(negedge clk);
        conv_end = 0;
        lat = 1;
        while (!done) begin @(negedge clk); lat++; end
        check(lat == ((c == 0) ? L + 3 : 2 * L + 6), $sformatf("latency %0d (first=%0d)", lat, c == 0));
        check((max0 ^ max1) == best,
              $sformatf("window %0d conv %0d: got %h exp %h", win, c, max0 ^ max1, best));
        if (max1 != 0) masked_seen++;
      end
    end
    check(masked_seen > 100, "output shares are masked");
    check(prev_windows > 20, "previous-layer (B2A) inputs used");
    check(relu_zero > 10, "negative sums clipped by ReLU");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
