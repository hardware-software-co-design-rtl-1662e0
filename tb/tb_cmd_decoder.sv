// tb_cmd_decoder: plays the core's side of PCPI and the SNNU's done signal.
// Checks the decoding of all five mnn.* instructions: configuration writes
// (index from funct7, pointer, size), the pixel request with address
// computation and the host ack, the layer trigger with layer type and
// masking bit, the wait/ready handshake, the result in rd of mnn.olayer,
// and that non-custom instructions are ignored.
// The instruction names and operands follow the document; the
// funct3/funct7 encoding and the handshake timing checked here are this
// design's choices.
module tb_cmd_decoder;
  import snn_pkg::*;
  localparam int AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        pv = 0, pwr, pwait, prdy;
  logic [31:0] insn = 0, rs1 = 0, rs2 = 0, prd;
  logic        cfg_we, start, men, done = 0, preq, pxwe = 0, ack = 0, mwe, active;
  cfg_idx_e    cidx;
  logic [31:0] cptr, csize, pnum, pxd = 0, mwd, result = 0;
  layer_e      layer;
  logic [15:0] pxc = 0;
  logic [AW-1:0] maddr;
  cmd_decoder #(.AW(AW)) dut (.clk_i(clk), .rst_ni(rst_n),
    .pcpi_valid_i(pv), .pcpi_insn_i(insn), .pcpi_rs1_i(rs1), .pcpi_rs2_i(rs2),
    .pcpi_wr_o(pwr), .pcpi_rd_o(prd), .pcpi_wait_o(pwait), .pcpi_ready_o(prdy),
    .cfg_we_o(cfg_we), .cfg_idx_o(cidx), .cfg_ptr_o(cptr), .cfg_size_o(csize),
    .start_o(start), .layer_o(layer), .men_o(men), .done_i(done), .result_i(result),
    .pixel_req_o(preq), .pixel_num_o(pnum), .px_we_i(pxwe), .px_cnt_i(pxc),
    .px_data_i(pxd), .px_ack_i(ack), .px_mem_we_o(mwe), .px_mem_addr_o(maddr),
    .px_mem_wdata_o(mwd), .active_o(active));
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
  function automatic logic [31:0] enc(int f3, int f7);
    return {7'(f7), 5'd2, 5'd1, 3'(f3), 5'd3, 7'b0001011};
  endfunction
  // count events
  int cfg_writes = 0, starts = 0;
  cfg_idx_e last_idx; logic [31:0] last_ptr, last_size; layer_e last_layer; logic last_men;
  always @(posedge clk) begin
    if (cfg_we) begin cfg_writes++; last_idx <= cidx; last_ptr <= cptr; last_size <= csize; end
    if (start) begin starts++; last_layer <= layer; last_men <= men; end
  end
  task automatic issue(input logic [31:0] i, input logic [31:0] a, input logic [31:0] b,
                       input int done_after, output logic [31:0] rd, output bit wr);
    int n = 0;
    @(negedge clk);
    pv = 1; insn = i; rs1 = a; rs2 = b;
    while (!prdy) begin
      @(negedge clk);
      n++;
      check(pwait || prdy, "pcpi_wait held until ready");
      if (n == done_after) begin done = 1; @(negedge clk); done = 0; end
    end
    rd = prd; wr = pwr;
    @(negedge clk);
    pv = 0;
  endtask
  initial begin
    logic [31:0] rd; bit wr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      issue(enc(F3_CFGWR, k), 32'h100 * (k + 1), 32'h10 + k, 0, rd, wr);
      check(last_idx == cfg_idx_e'(k) && last_ptr == 32'h100 * (k + 1) && last_size == 32'h10 + k,
            $sformatf("cfgwr %0d", k));
      check(!wr, "cfgwr writes no rd");
    end
    check(cfg_writes == 4, "one configuration write per mnn.cfgwr");
    // ifetch: host writes 3 pixel words, then acks
    fork
      issue(enc(F3_IFETCH, 0), 32'h0000_4000, 32'd3, 0, rd, wr);
      begin
        wait (preq);
        check(pnum == 3, "pixel count forwarded");
        for (int c = 0; c < 3; c++) begin
          @(negedge clk); pxwe = 1; pxc = 16'(c); pxd = 32'hA0 + c;
          #1;
          check(mwe && maddr == AW'(32'h1000 + c) && mwd == 32'hA0 + c, "pixel write address = pointer + count");
          @(negedge clk); pxwe = 0;
        end
        @(negedge clk); ack = 1; @(negedge clk); ack = 0;
      end
    join
    check(!preq, "pixel request dropped after ack");
    // layer instructions
    issue(enc(F3_ILAYER, 0), 32'd1, 0, 20, rd, wr);
    check(last_layer == LAYER_INPUT && last_men == 1 && !wr, "ilayer masked");
    issue(enc(F3_HLAYER, 0), 32'd0, 0, 5, rd, wr);
    check(last_layer == LAYER_HIDDEN && last_men == 0, "hlayer clear");
    result = 32'hCAFE_0042;
    issue(enc(F3_OLAYER, 0), 32'd1, 0, 7, rd, wr);
    check(last_layer == LAYER_OUTPUT && last_men == 1, "olayer masked");
    check(wr && rd == 32'hCAFE_0042, "olayer returns the result in rd");
    check(starts == 3, "one trigger per layer instruction");
    // a standard instruction (ADD) is not ours
    @(negedge clk); pv = 1; insn = 32'h0020_81B3;
    repeat (5) begin @(negedge clk); check(!prdy && !pwait && !cfg_we && !start, "foreign instruction ignored"); end
    pv = 0;
    // custom-0 with an unused funct3
    @(negedge clk); pv = 1; insn = enc(7, 0);
    repeat (3) begin @(negedge clk); check(!prdy && !active, "unused funct3 ignored"); end
    pv = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
