// tb_dp_ram: random traffic on both ports (byte strobes, reads, writes to
// distinct words) against an array model, at a reduced depth.
// A dual-ported shared memory is the document's; the byte strobes and read
// timing checked here are this design's choices.
module tb_dp_ram;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic          ae = 0, be = 0;
  logic [3:0]    aw = 0, bw = 0;
  logic [AW-1:0] aa = 0, ba = 0;
  logic [31:0]   ad = 0, bd = 0, ar, br;
  dp_ram #(.DEPTH(DEPTH)) dut (.clk_i(clk), .a_en_i(ae), .a_we_i(aw), .a_addr_i(aa),
    .a_wdata_i(ad), .a_rdata_o(ar), .b_en_i(be), .b_we_i(bw), .b_addr_i(ba),
    .b_wdata_i(bd), .b_rdata_o(br));
  int checks = 0, failures = 0;
  logic [31:0] m [DEPTH];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] ea, eb;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      ae = 1; aw = 4'hF; aa = AW'(a); ad = $urandom; m[a] = ad;
      @(negedge clk);
    end
    for (int i = 0; i < 3000; i++) begin
      ae = 1; be = 1;
      aa = AW'($urandom); ba = AW'($urandom);
      if (ba == aa) ba = ba + 1'b1;
      aw = 4'($urandom); bw = ($urandom_range(0, 1)) ? 4'($urandom) : 4'h0;
      ad = $urandom; bd = $urandom;
      ea = m[aa]; eb = m[ba];
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        if (aw[b]) m[aa][8*b +: 8] = ad[8*b +: 8];
        if (bw[b]) m[ba][8*b +: 8] = bd[8*b +: 8];
      end
      checks += 2;
      if (ar !== ea) begin failures++; $display("FAIL A: %h exp %h", ar, ea); end
      if (br !== eb) begin failures++; $display("FAIL B: %h exp %h", br, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
