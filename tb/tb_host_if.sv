// tb_host_if: byte-bus transactions into the host interface. Checks
// software reset, start, ack pulses, romload word assembly with address
// auto-increment, pixel words with count auto-increment, status and
// result read-back.
// The commands follow the document's start-up sequence; the register map
// checked here is this design's own.
module tb_host_if;
  localparam int AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] a = 0;
  logic        wr = 0, rd = 0, srst, run, lwe, preq = 0, pwe, ack, rv = 0;
  logic [7:0]  wd = 0, rdat;
  logic [AW-1:0] la;
  logic [31:0] ld, pnum = 32'd77, pd, r0 = 32'h8005_1234, r1 = 32'h8007_4321;
  logic [15:0] pc;
  host_if #(.AW(AW)) dut (.clk_i(clk), .rst_ni(rst_n), .addr_i(a), .wr_i(wr), .rd_i(rd),
    .wdata_i(wd), .rdata_o(rdat), .soft_rst_o(srst), .core_run_o(run),
    .load_we_o(lwe), .load_addr_o(la), .load_data_o(ld), .pixel_req_i(preq),
    .pixel_num_i(pnum), .px_we_o(pwe), .px_cnt_o(pc), .px_data_o(pd), .px_ack_o(ack),
    .result_valid_i(rv), .result0_i(r0), .result1_i(r1));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // record strobes
  logic [AW-1:0] loads_a [$]; logic [31:0] loads_d [$];
  logic [15:0] px_c [$]; logic [31:0] px_d [$];
  int srsts = 0, acks = 0;
  always @(posedge clk) if (rst_n) begin
    if (lwe) begin loads_a.push_back(la); loads_d.push_back(ld); end
    if (pwe) begin px_c.push_back(pc); px_d.push_back(pd); end
    if (srst) srsts++;
    if (ack) acks++;
  end
  task automatic bw(input logic [15:0] ad, input logic [7:0] d);
    @(negedge clk); a = ad; wd = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic br(input logic [15:0] ad, output logic [7:0] d);
    @(negedge clk); a = ad; rd = 1; @(negedge clk); rd = 0; d = rdat;
  endtask
  initial begin
    logic [7:0] d; logic [31:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    bw(16'h00, 8'h02);
    check(run, "start releases core");
    bw(16'h00, 8'h01);
    @(negedge clk);
    check(!run && srsts == 1, "software reset stops core and pulses");
    bw(16'h04, 8'h10); bw(16'h05, 8'h02);   // word 0x210
    for (int i = 0; i < 3; i++) begin
      w = 32'h1122_3300 + i;
      for (int b = 0; b < 4; b++) bw(16'h08 + 16'(b), w[8*b +: 8]);
    end
    repeat (2) @(negedge clk);
    check(loads_a.size() == 3, "three romload writes");
    for (int i = 0; i < 3 && i < loads_a.size(); i++)
      check(loads_a[i] == AW'(32'h210 + i) && loads_d[i] == 32'h1122_3300 + i, "romload address and data");
    preq = 1;
    br(16'h00, d);
    check(d[0] == 1 && d[1] == 0, "status shows pixel request");
    for (int b = 0; b < 4; b++) begin br(16'h14 + 16'(b), d); w[8*b +: 8] = d; end
    check(w == 77, "pixel count readable");
    bw(16'h0C, 8'h05); bw(16'h0D, 8'h00);
    for (int i = 0; i < 2; i++) begin
      w = 32'hABCD_0000 + i;
      for (int b = 0; b < 4; b++) bw(16'h10 + 16'(b), w[8*b +: 8]);
    end
    bw(16'h00, 8'h04);
    repeat (2) @(negedge clk);
    check(px_c.size() == 2 && acks == 1, $sformatf("two pixel writes and one ack: %0d %0d", px_c.size(), acks));
    for (int i = 0; i < 2 && i < px_c.size(); i++)
      check(px_c[i] == 16'(5 + i) && px_d[i] == 32'hABCD_0000 + i, "pixel count and data");
    rv = 1;
    br(16'h00, d);
    check(d[1], "status shows result valid");
    for (int b = 0; b < 4; b++) begin br(16'h20 + 16'(b), d); w[8*b +: 8] = d; end
    check(w == r0, "result share 0");
    for (int b = 0; b < 4; b++) begin br(16'h24 + 16'(b), d); w[8*b +: 8] = d; end
    check(w == r1, "result share 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
