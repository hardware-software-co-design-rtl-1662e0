// tb_act_mem: random half-location writes and reads against an array model;
// checks one-cycle read latency and that writing one half keeps the other.
// The two-activation word format checked here follows the document's
// activation memory; the depth and the one-cycle read are this design's
// choices.
module tb_act_mem;
  localparam int DEPTH = 32;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0]    we = 0;
  logic [AW-1:0] wa = 0, ra = 0;
  logic [3:0]    wd = 0, rd;
  act_mem #(.DEPTH(DEPTH)) dut (.clk_i(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd),
    .raddr_i(ra), .rdata_o(rd));
  int checks = 0, failures = 0;
  logic [3:0] m [DEPTH];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [3:0] e;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 2'b11; wa = AW'(a); wd = 4'(a); m[a] = 4'(a);
      @(negedge clk);
    end
    for (int i = 0; i < 3000; i++) begin
      we = 2'($urandom); wa = AW'($urandom); wd = 4'($urandom); ra = AW'($urandom);
      e = m[ra];
      @(negedge clk);
      if (we[0]) m[wa][1:0] = wd[1:0];
      if (we[1]) m[wa][3:2] = wd[3:2];
      checks++;
      if (rd !== e) begin failures++; $display("FAIL: %h exp %h", rd, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
