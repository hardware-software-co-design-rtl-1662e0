// tb_masked_mux: random shared select and data every cycle; one cycle later
// the recombined output must equal sel ? a : b.
// A masked multiplexer of DOM AND gates follows the document; its exact
// structure and latency are this design's.
module tb_masked_mux;
  localparam int W = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic         s0 = 0, s1 = 0;
  logic [W-1:0] a0 = 0, a1 = 0, b0 = 0, b1 = 0, r = 0, o0, o1;
  masked_mux #(.W(W)) dut (.clk_i(clk), .sel0_i(s0), .sel1_i(s1), .a0_i(a0),
    .a1_i(a1), .b0_i(b0), .b1_i(b1), .r_i(r), .o0_o(o0), .o1_o(o1));
  int checks = 0, failures = 0, nsel = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] e;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      s0 = $urandom_range(0, 1); s1 = $urandom_range(0, 1);
      a0 = W'($urandom); a1 = W'($urandom); b0 = W'($urandom); b1 = W'($urandom);
      r = W'($urandom);
      e = (s0 ^ s1) ? (a0 ^ a1) : (b0 ^ b1);
      nsel += s0 ^ s1;
      @(negedge clk);
      checks++;
      if ((o0 ^ o1) !== e) begin failures++; $display("FAIL: %h exp %h", o0 ^ o1, e); end
    end
    checks++;
    if (nsel < 100 || nsel > 900) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
