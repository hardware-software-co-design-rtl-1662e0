// tb_prng: checks the mask generator against an independent xorshift64
// model (same seed schedule), that it holds when disabled, restarts from
// the seed after reset, and that its bits are roughly balanced.
// The document only names a PRNG; the xorshift generator modelled here is
// this design's choice.
module tb_prng;
  localparam int W = 100;
  localparam logic [63:0] SEED = 64'h1234_5678_9ABC_DEF0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [W-1:0] r;
  prng #(.W(W), .SEED(SEED)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .rnd_o(r));
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [63:0] step(logic [63:0] x);
    x ^= x << 13; x ^= x >> 7; x ^= x << 17;
    return x;
  endfunction
  initial begin
    logic [63:0] s [2];
    logic [127:0] e;
    logic [W-1:0] held;
    longint ones = 0;
    for (int l = 0; l < 2; l++) s[l] = SEED ^ (64'(l + 1) * 64'hD1B5_4A32_D192_ED03);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      e = {s[1], s[0]};
      checks++;
      if (r !== e[W-1:0]) begin failures++; $display("FAIL step %0d", i); end
      en = (i % 5 != 4);
      held = r;
      @(negedge clk);
      if (en) for (int l = 0; l < 2; l++) s[l] = step(s[l]);
      else begin checks++; if (r !== held) failures++; end
      ones += $countones(r);
    end
    checks++;
    if (ones < 2000 * W * 45 / 100 || ones > 2000 * W * 55 / 100) begin
      failures++; $display("FAIL: bias %0d", ones);
    end
    rst_n = 0; @(negedge clk); rst_n = 1;
    e = {SEED ^ (64'd2 * 64'hD1B5_4A32_D192_ED03), SEED ^ 64'hD1B5_4A32_D192_ED03};
    checks++;
    if (r !== e[W-1:0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
