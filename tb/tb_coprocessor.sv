// tb_coprocessor: the coprocessor (command decoder + SNNU) between a PCPI
// bus-functional core and a two-port word memory model. Runs mnn.ifetch
// (pixels written through the coprocessor into memory at pointer + count),
// then the configuration and layer instructions of a 32-8-8-4 network for
// a fully clear and a fully masked inference on each of four random
// networks, and checks the returned rd,
// the result words and the result-valid flag against a reference model.
// The instruction sequence follows the document's example program; the
// network is smaller than the document's to keep the run short.
module tb_coprocessor;
  import snn_pkg::*;
  localparam int AW = 14;
  localparam int NI = 32, NH = 8, NO = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        pv = 0, pwr, pwait, prdy;
  logic [31:0] insn = 0, rs1 = 0, rs2 = 0, prd;
  logic        preq, pxwe = 0, ack = 0, active, ae, awe, be, rvalid;
  logic [31:0] pnum, pxd = 0, awd, ard, brd, r0, r1;
  logic [15:0] pxc = 0;
  logic [AW-1:0] aa, ba;
  coprocessor dut (.clk_i(clk), .rst_ni(rst_n),
    .pcpi_valid_i(pv), .pcpi_insn_i(insn), .pcpi_rs1_i(rs1), .pcpi_rs2_i(rs2),
    .pcpi_wr_o(pwr), .pcpi_rd_o(prd), .pcpi_wait_o(pwait), .pcpi_ready_o(prdy),
    .pixel_req_o(preq), .pixel_num_o(pnum), .px_we_i(pxwe), .px_cnt_i(pxc),
    .px_data_i(pxd), .px_ack_i(ack), .active_o(active),
    .ma_en_o(ae), .ma_we_o(awe), .ma_addr_o(aa), .ma_wdata_o(awd), .ma_rdata_i(ard),
    .mb_en_o(be), .mb_addr_o(ba), .mb_rdata_i(brd),
    .result_valid_o(rvalid), .result0_o(r0), .result1_o(r1));
  logic [31:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (ae) begin ard <= mem[aa]; if (awe) mem[aa] <= awd; end
    if (be) brd <= mem[ba];
  end
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int IMG = 'h100, BIAS = 'h200, W0 = 'h300, W1 = 'h400, W2 = 'h500;
  logic [15:0] pix [NI], bias [NH];
  bit wi [NH][NI], wh [NH][NH], wo [NO][NH];
  logic [15:0] escore; int ecls;
  function automatic void ref_model();
    bit a0 [NH], a1 [NH];
    logic [15:0] s, key, best;
    for (int j = 0; j < NH; j++) begin
      s = bias[j];
      for (int i = 0; i < NI; i++) s = wi[j][i] ? s + pix[i] : s - pix[i];
      a0[j] = ~s[15];
    end
    for (int j = 0; j < NH; j++) begin
      s = 0;
      for (int i = 0; i < NH; i++) s = (a0[i] == wh[j][i]) ? s + 1 : s - 1;
      a1[j] = ~s[15];
    end
    for (int j = 0; j < NO; j++) begin
      s = 0;
      for (int i = 0; i < NH; i++) s = (a1[i] == wo[j][i]) ? s + 1 : s - 1;
      key = s ^ 16'h8000;
      if (j == 0 || key > best) begin best = key; escore = s; ecls = j; end
    end
  endfunction
  function automatic logic [31:0] enc(int f3, int f7);
    return {7'(f7), 5'd2, 5'd1, 3'(f3), 5'd3, OPC_CUSTOM0};
  endfunction
  task automatic issue(input logic [31:0] i, input logic [31:0] a, input logic [31:0] b,
                       output logic [31:0] rd, output bit wr);
    @(negedge clk); pv = 1; insn = i; rs1 = a; rs2 = b;
    @(posedge clk); #1;
    while (!prdy) begin @(posedge clk); #1; end
    rd = prd; wr = pwr;
    @(negedge clk); pv = 0;
  endtask
  task automatic infer(input bit m, input string tag);
    logic [31:0] rd; bit wr;
    for (int k = 0; k < NI / 2; k++) mem[IMG + k] = 32'hDEAD_DEAD;
    fork
      issue(enc(F3_IFETCH, 0), IMG * 4, NI / 2, rd, wr);
      begin
        wait (preq);
        for (int k = 0; k < NI / 2; k++) begin
          @(negedge clk); pxwe = 1; pxc = 16'(k); pxd = {pix[2*k+1], pix[2*k]};
        end
        @(negedge clk); pxwe = 0;
        @(negedge clk); ack = 1; @(negedge clk); ack = 0;
      end
    join
    for (int k = 0; k < NI / 2; k++) check(mem[IMG + k] == {pix[2*k+1], pix[2*k]}, {tag, ": pixel word in memory"});
    issue(enc(F3_CFGWR, CFG_IMAGE), IMG * 4, NI / 2, rd, wr);
    issue(enc(F3_CFGWR, CFG_WEIGHT), W0 * 4, NI * NH, rd, wr);
    issue(enc(F3_CFGWR, CFG_BIAS), BIAS * 4, NH, rd, wr);
    issue(enc(F3_CFGWR, CFG_DIMS), NI, NH, rd, wr);
    issue(enc(F3_ILAYER, 0), m, 0, rd, wr);
    check(!rvalid, {tag, ": no result after the input layer"});
    issue(enc(F3_CFGWR, CFG_WEIGHT), W1 * 4, NH * NH, rd, wr);
    issue(enc(F3_CFGWR, CFG_DIMS), NH, NH, rd, wr);
    issue(enc(F3_HLAYER, 0), m, 0, rd, wr);
    issue(enc(F3_CFGWR, CFG_WEIGHT), W2 * 4, NH * NO, rd, wr);
    issue(enc(F3_CFGWR, CFG_DIMS), NH, NO, rd, wr);
    issue(enc(F3_OLAYER, 0), m, 0, rd, wr);
    check(wr && rd == r0, {tag, ": olayer returns result word"});
    check(rvalid, {tag, ": result valid"});
    check(r0[31] == m && r1[31] == m, {tag, ": masked flag"});
    check(!m || r1[23:0] != 0, {tag, ": second share set carries a mask"});
    check((r0[15:0] ^ r1[15:0]) == escore, $sformatf("%s: score %h exp %h", tag, r0[15:0] ^ r1[15:0], escore));
    check(int'(r0[23:16] ^ r1[23:16]) == ecls, {tag, ": class"});
  endtask
  task automatic gen_net();
    for (int i = 0; i < NI; i++) pix[i] = 16'($urandom_range(0, 255));
    for (int j = 0; j < NH; j++) bias[j] = 16'($urandom_range(0, 200)) - 16'd100;
    foreach (wi[j, i]) wi[j][i] = $urandom_range(0, 1);
    foreach (wh[j, i]) wh[j][i] = $urandom_range(0, 1);
    foreach (wo[j, i]) wo[j][i] = $urandom_range(0, 1);
    for (int j = 0; j < NH; j++) begin
      mem[BIAS + j] = {{16{bias[j][15]}}, bias[j]};
      for (int b = 0; b < 32; b++) mem[W0 + j][b] = wi[j][b];
      mem[W1 + j] = 0;
      for (int b = 0; b < NH; b++) mem[W1 + j][b] = wh[j][b];
    end
    for (int j = 0; j < NO; j++) begin
      mem[W2 + j] = 0;
      for (int b = 0; b < NH; b++) mem[W2 + j][b] = wo[j][b];
    end
    ref_model();
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      gen_net();
      infer(0, "clear");
      infer(1, "masked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
