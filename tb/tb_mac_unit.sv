// tb_mac_unit: random clear/init, enable, operand and sign sequences against
// a modular accumulator model.
// Modular accumulation follows the document; the interface is this
// design's own.
module tb_mac_unit;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         clr = 0, en = 0, neg = 0;
  logic [W-1:0] init = 0, x = 0, acc;
  mac_unit #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .clr_i(clr), .init_i(init),
    .en_i(en), .x_i(x), .neg_i(neg), .acc_o(acc));
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (acc !== 0) failures++;
    for (int i = 0; i < 3000; i++) begin
      clr = ($urandom_range(0, 30) == 0); en = $urandom_range(0, 3) != 0;
      init = W'($urandom); x = W'($urandom); neg = $urandom_range(0, 1);
      if (clr) m = init;
      else if (en) m = neg ? m - x : m + x;
      @(negedge clk);
      checks++;
      if (acc !== m) begin failures++; $display("FAIL %0d: %h exp %h", i, acc, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
