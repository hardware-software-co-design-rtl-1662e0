// tb_unmasked_output_layer: groups of scores, one per cycle, against a
// two-phase reference (largest below K/2, else global maximum, first wins
// ties), including groups with no score below K/2.
// A register and a comparator follow the document; the MSB-flipped key is
// this design's choice.
module tb_unmasked_output_layer;
  localparam int W = 16, CW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic          vi = 0, first = 0;
  logic [W-1:0]  s = 0, m;
  logic [CW-1:0] c;
  unmasked_output_layer #(.W(W), .CW(CW)) dut (.clk_i(clk), .rst_ni(rst_n),
    .valid_i(vi), .first_i(first), .score_i(s), .max_score_o(m), .class_o(c));
  int checks = 0, failures = 0, phase2 = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] sc [12];
    logic [W-1:0] best;
    int n, bcls;
    bit found;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 200; g++) begin
      n = $urandom_range(1, 12);
      for (int i = 0; i < n; i++) begin
        sc[i] = W'($urandom);
        if (g % 3 == 1) sc[i][W-1] = 1'b1;
        if (g % 3 == 2 && i > 0 && $urandom_range(0, 2) == 0) sc[i] = sc[0];
      end
      found = 0;
      for (int i = 0; i < n; i++)
        if (!sc[i][W-1] && (!found || sc[i] > best)) begin found = 1; best = sc[i]; bcls = i; end
      if (!found) begin
        phase2++;
        for (int i = 0; i < n; i++) if (i == 0 || sc[i] > best) begin best = sc[i]; bcls = i; end
      end
      for (int i = 0; i < n; i++) begin
        vi = 1; first = (i == 0); s = sc[i];
        @(negedge clk);
        // idle cycles between scores do not disturb the result
        vi = 0;
        if ($urandom_range(0, 1)) @(negedge clk);
      end
      checks += 2;
      if (m !== best) begin failures++; $display("FAIL: %h exp %h", m, best); end
      if (c !== CW'(bcls)) begin failures++; $display("FAIL: class %0d exp %0d", c, bcls); end
    end
    checks++;
    if (phase2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
