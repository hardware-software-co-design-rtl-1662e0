// tb_b2a_word: self-checking test of the W-bit Boolean-to-arithmetic
// conversion. Streams random values x, one per cycle with random gaps,
// as random Boolean shares (m, x ^ m) with random gadget randomness, and
// checks that a0 + a1 = x mod 2**16 for every output, that outputs come
// ks_levels(W) + 3 cycles after their input, in order, and that the
// arithmetic shares are not the plain value.
// The document places a B2A stage in front of the multipliers for
// previous-layer activations; its construction and latency are this
// design's own.
module tb_b2a_word;
  import snn_pkg::*;

  localparam int unsigned W   = 16;
  localparam int unsigned RND = W + ks_rnd_bits(W);
  localparam int unsigned LAT = ks_levels(W) + 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           valid = 0, valid_o;
  logic [W-1:0]   b0 = 0, b1 = 0, a0, a1;
  logic [RND-1:0] rnd = '0;

  b2a_word #(.W(W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .b0_i(b0), .b1_i(b1),
    .rnd_i(rnd), .valid_o(valid_o), .a0_o(a0), .a1_o(a1)
  );

  int checks = 0, failures = 0, masked = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] exp_q[$];
  int           t_in[$];
  int           cyc = 0;
  always @(posedge clk) cyc++;

  // checker
  always @(negedge clk) begin
    if (rst_n && valid_o) begin
      if (exp_q.size() == 0) check(0, "output without input");
      else begin
        logic [W-1:0] e;
        int t;
        e = exp_q.pop_front();
        t = t_in.pop_front();
        check(W'(a0 + a1) == e, $sformatf("a0+a1 = %h exp %h", W'(a0 + a1), e));
        check(cyc - t + 1 == LAT, $sformatf("latency %0d exp %0d", cyc - t + 1, LAT));
        if (a0 != e) masked++;
      end
    end
  end

  initial begin
    logic [W-1:0] x, m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      for (int k = 0; k < RND; k += 32) rnd[k +: 32] = $urandom;
      valid = ($urandom_range(0, 3) != 0);
      if (valid) begin
        x = W'($urandom);
        if (i % 50 == 0) x = (i % 100 == 0) ? '0 : '1;
        m = W'($urandom);
        b0 = m; b1 = x ^ m;
        exp_q.push_back(x);
        t_in.push_back(cyc + 1);   // cyc after the capturing edge
      end
      @(negedge clk);
    end
    valid = 0;
    repeat (LAT + 3) @(negedge clk);
    check(exp_q.size() == 0, "all values came out");
    check(masked > 600, "arithmetic shares are masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
