// tb_masked_relu: random arithmetic sharings (including values at and
// around K/2 and 0) streamed one per cycle; checks the recombined output
// against ReLU_MOD(x) = (x >= K/2) ? 0 : x and the latency.
// ReLU with modular arithmetic as an AND with the inverted MSB follows the
// document; the latency is this design's.
module tb_masked_relu;
  import snn_pkg::*;
  localparam int W = 16;
  localparam int RND = ks_rnd_bits(W) + W - 1;
  localparam int LAT = ks_levels(W) + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic vi = 0, vo;
  logic [W-1:0] s0 = 0, s1 = 0, y0, y1;
  logic [RND-1:0] rnd = '0;
  masked_relu #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vi), .s0_i(s0),
    .s1_i(s1), .rnd_i(rnd), .valid_o(vo), .y0_o(y0), .y1_o(y1));
  always @(negedge clk) for (int i = 0; i < RND; i += 32) rnd[i +: 32] = $urandom;
  int checks = 0, failures = 0, cyc = 0, zeros = 0, pass = 0;
  logic [W-1:0] eq [$];
  int tq [$];
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) if (rst_n && vo) begin
    logic [W-1:0] e; int t;
    e = eq.pop_front(); t = tq.pop_front();
    checks += 2;
    if ((y0 ^ y1) !== e) begin failures++; $display("FAIL: %h exp %h", y0 ^ y1, e); end
    if (cyc - t != LAT) begin failures++; $display("FAIL: latency %0d", cyc - t); end
    if (e == 0) zeros++; else pass++;
  end
  initial begin
    logic [W-1:0] x;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      vi = $urandom_range(0, 1);
      x = W'($urandom);
      case (i % 8) 0: x = 16'h7FFF; 1: x = 16'h8000; 2: x = 0; 3: x = 16'hFFFF; default: ; endcase
      s1 = W'($urandom); s0 = x - s1;
      if (vi) begin eq.push_back(x[W-1] ? '0 : x); tq.push_back(cyc); end
    end
    @(negedge clk); vi = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (zeros == 0 || pass == 0 || eq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
