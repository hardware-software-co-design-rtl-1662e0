// tb_soc_top: end-to-end test of the SoC at its default parameters.
//
// The host side drives the byte bus of the UART bridge (software reset,
// romload of parameters, start, pixel load, ack, result read-out); a small
// bus-functional model of the RISC-V core issues the mnn.* instruction
// sequence of one inference on PCPI, and makes a few ordinary memory
// accesses. A reference model in this file computes the binarized network
// (64 inputs, two hidden layers of 64, 10 outputs: mnn.ilayer computes the
// first hidden layer, one mnn.hlayer the second) independently, and the
// classification result is compared for the four masking configurations
// C1 (all clear), C2 (all masked), C3 (second hidden layer clear) and
// C4 (output layer clear), plus runs where every output score lies at or
// above half the modulus (the second phase of the maximum search). Then
// the 784-512-10 comparison network (one hidden layer) runs clear and
// masked, with its latency checked against one summation per cycle masked
// and two clear; the 64-64-64-10 latencies are checked against the
// reference figures of 4997 (clear) and 10150 (masked) cycles.
// The masked 8-bit convolution path next to it runs 2x2 pooling windows
// of 3x3 convolutions against a reference with ReLU and maximum, on
// pixels and on Boolean-shared previous-layer activations.
// Counts how often each mechanism happened and fails if one never did.
// The network sizes, the configurations C1 to C4 and the reference
// latencies are the document's; the memory layout and host protocol are
// this design's.
module tb_soc_top;
  import snn_pkg::*;

  // largest network run
  localparam int MAX_IN  = 784;
  localparam int MAX_H   = 512;
  localparam int MAX_OUT = 10;

  // current network: inputs, hidden width, outputs, with or without a
  // second hidden layer (mnn.hlayer)
  int N_IN, N_H, N_OUT;
  bit HAS_HL;
  int WPI, WPH;   // weight words per neuron from the inputs / from a hidden layer

  // byte addresses of the data structures, packed after the firmware words
  int unsigned IMG_A, BIAS_A, W0_A, W1_A, W2_A;
  function automatic void set_net(int ni, int nh, int no, bit hl);
    N_IN = ni; N_H = nh; N_OUT = no; HAS_HL = hl;
    WPI = (ni + 31) / 32;
    WPH = (nh + 31) / 32;
    IMG_A  = 16 * 4;
    BIAS_A = IMG_A + 4 * (ni / 2);
    W0_A   = BIAS_A + 4 * nh;
    W1_A   = W0_A + 4 * nh * WPI;
    W2_A   = W1_A + (hl ? 4 * nh * WPH : 0);
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] haddr;
  logic        hwr = 0, hrd = 0;
  logic [7:0]  hwdata, hrdata;
  logic        core_resetn;
  logic        mem_valid = 0, mem_ready;
  logic [31:0] mem_addr = 0, mem_wdata = 0, mem_rdata;
  logic [3:0]  mem_wstrb = 0;
  logic        pcpi_valid = 0, pcpi_wr, pcpi_wait, pcpi_ready;
  logic [31:0] pcpi_insn = 0, pcpi_rs1 = 0, pcpi_rs2 = 0, pcpi_rd;

  soc_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .host_addr_i(haddr), .host_wr_i(hwr), .host_rd_i(hrd),
    .host_wdata_i(hwdata), .host_rdata_o(hrdata),
    .core_resetn_o(core_resetn),
    .mem_valid_i(mem_valid), .mem_addr_i(mem_addr), .mem_wdata_i(mem_wdata),
    .mem_wstrb_i(mem_wstrb), .mem_ready_o(mem_ready), .mem_rdata_o(mem_rdata),
    .pcpi_valid_i(pcpi_valid), .pcpi_insn_i(pcpi_insn), .pcpi_rs1_i(pcpi_rs1),
    .pcpi_rs2_i(pcpi_rs2), .pcpi_wr_o(pcpi_wr), .pcpi_rd_o(pcpi_rd),
    .pcpi_wait_o(pcpi_wait), .pcpi_ready_o(pcpi_ready),
    .qc_start_i(qc_start), .qc_bias_i(qc_bias), .qc_valid_i(qc_valid),
    .qc_pix_i(qc_pix), .qc_prev_i(qc_prev), .qc_act0_i(qc_act0), .qc_act1_i(qc_act1), .qc_wgt_i(qc_wgt), .qc_conv_end_i(qc_end),
    .qc_pool_first_i(qc_first), .qc_ready_o(qc_ready), .qc_pool_done_o(qc_done),
    .qc_max0_o(qc_max0), .qc_max1_o(qc_max1)
  );

  // masked 8-bit convolution extension
  logic        qc_start = 0, qc_valid = 0, qc_end = 0, qc_first = 0, qc_ready, qc_done;
  logic [15:0] qc_bias = 0, qc_max0, qc_max1;
  logic [7:0]  qc_pix = 0, qc_wgt = 0;
  logic        qc_prev = 0;
  logic [15:0] qc_act0 = 0, qc_act1 = 0;
  int          qconv_windows = 0, relu_clips = 0, qconv_b2a = 0;

  // one 2x2 pooling window of 3x3 convolutions; returns expected and got
  task automatic qconv_window(output logic [15:0] exp_max, output logic [15:0] got);
    logic [15:0] s, relu, x, m;
    logic [7:0]  p, w;
    exp_max = 0;
    for (int c = 0; c < 4; c++) begin
      while (!qc_ready) @(negedge clk);
      s = 16'($urandom_range(0, 600)) - 16'd300;
      qc_bias = s; qc_start = 1;
      @(negedge clk);
      qc_start = 0;
      for (int t = 0; t < 9; t++) begin
        p = 8'($urandom); w = 8'($urandom_range(0, 15)) - 8'd8;
        x = qc_prev ? 16'($urandom_range(0, 255)) : {{8{p[7]}}, p};
        m = 16'($urandom);
        qc_pix = p; qc_wgt = w; qc_valid = 1; qc_act0 = m; qc_act1 = x ^ m;
        s += x * {{8{w[7]}}, w};
        @(negedge clk);
      end
      qc_valid = 0;
      while (!qc_ready) @(negedge clk);
      qc_end = 1; qc_first = (c == 0);
      relu = s[15] ? 16'd0 : s;
      if (s[15]) relu_clips++;
      if (relu > exp_max) exp_max = relu;
      @(negedge clk);
      qc_end = 0;
      while (!qc_done) @(negedge clk);
    end
    got = qc_max0 ^ qc_max1;
    qconv_windows++;
    if (qc_prev) qconv_b2a++;
  endtask

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ network
  logic [15:0] pix  [MAX_IN];
  logic [15:0] bias [MAX_H];
  bit          w0 [MAX_H][MAX_IN];
  bit          w1 [MAX_H][MAX_H];
  bit          w2 [MAX_OUT][MAX_H];
  bit          a0 [MAX_H], a1 [MAX_H], al [MAX_H];
  logic [15:0] score [MAX_OUT];
  int          exp_cls;
  logic [15:0] exp_score;

  function automatic void ref_model();
    logic [15:0] s;
    logic [15:0] key, best;
    for (int j = 0; j < N_H; j++) begin
      s = bias[j];
      for (int i = 0; i < N_IN; i++) s = w0[j][i] ? s + pix[i] : s - pix[i];
      a0[j] = ~s[15];
    end
    for (int j = 0; j < N_H; j++) begin
      s = 0;
      for (int i = 0; i < N_H; i++) s = (a0[i] == w1[j][i]) ? s + 1 : s - 1;
      a1[j] = ~s[15];
    end
    for (int j = 0; j < N_H; j++) al[j] = HAS_HL ? a1[j] : a0[j];
    for (int j = 0; j < N_OUT; j++) begin
      s = 0;
      for (int i = 0; i < N_H; i++) s = (al[i] == w2[j][i]) ? s + 1 : s - 1;
      score[j] = s;
      key = s ^ 16'h8000;
      if (j == 0 || key > best) begin
        best      = key;
        exp_cls   = j;
        exp_score = s;
      end
    end
  endfunction

  task automatic gen_net();
    for (int i = 0; i < N_IN; i++) pix[i] = 16'($urandom_range(0, 255));
    for (int j = 0; j < N_H; j++) bias[j] = 16'($urandom_range(0, 512)) - 16'd256;
    foreach (w0[j, i]) w0[j][i] = $urandom_range(0, 1);
    foreach (w1[j, i]) w1[j][i] = $urandom_range(0, 1);
    foreach (w2[j, i]) w2[j][i] = $urandom_range(0, 1);
    ref_model();
  endtask

  // ------------------------------------------------------------ host bus
  task automatic hwrite(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); haddr = a; hwdata = d; hwr = 1;
    @(negedge clk); hwr = 0;
  endtask
  task automatic hread(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); haddr = a; hrd = 1;
    @(negedge clk); hrd = 0; d = hrdata;
  endtask
  task automatic hword(input logic [15:0] base, input logic [31:0] w);
    for (int b = 0; b < 4; b++) hwrite(base + 16'(b), w[8*b +: 8]);
  endtask
  task automatic hread32(input logic [15:0] base, output logic [31:0] w);
    logic [7:0] d;
    for (int b = 0; b < 4; b++) begin hread(base + 16'(b), d); w[8*b +: 8] = d; end
  endtask
  task automatic load_addr(input int unsigned byte_addr);
    hwrite(16'h04, 8'((byte_addr >> 2) & 8'hFF));
    hwrite(16'h05, 8'(byte_addr >> 10));
  endtask

  int romloads = 0;
  task automatic romload();
    logic [31:0] w;
    load_addr(0);
    hword(16'h08, 32'hDEAD_BEEF);   // stands in for the firmware image
    hword(16'h08, 32'h0000_0013);
    romloads++;
    load_addr(BIAS_A);
    for (int j = 0; j < N_H; j++) hword(16'h08, {{16{bias[j][15]}}, bias[j]});
    load_addr(W0_A);
    for (int j = 0; j < N_H; j++)
      for (int m = 0; m < WPI; m++) begin
        for (int b = 0; b < 32; b++) w[b] = (32*m + b < N_IN) ? w0[j][32*m+b] : 1'b0;
        hword(16'h08, w);
      end
    load_addr(W1_A);
    for (int j = 0; j < (HAS_HL ? N_H : 0); j++)
      for (int m = 0; m < WPH; m++) begin
        for (int b = 0; b < 32; b++) w[b] = (32*m + b < N_H) ? w1[j][32*m+b] : 1'b0;
        hword(16'h08, w);
      end
    load_addr(W2_A);
    for (int j = 0; j < N_OUT; j++)
      for (int m = 0; m < WPH; m++) begin
        for (int b = 0; b < 32; b++) w[b] = (32*m + b < N_H) ? w2[j][32*m+b] : 1'b0;
        hword(16'h08, w);
      end
  endtask

  // host: serve one pixel request
  int pixel_fetches = 0;
  task automatic host_pixels();
    logic [7:0]  st;
    logic [31:0] n;
    do hread(16'h00, st); while (!st[0]);
    pixel_fetches++;
    hread32(16'h14, n);
    check(n == N_IN / 2, "PIX_NUM equals requested pixel words");
    hwrite(16'h0C, 8'h00);
    hwrite(16'h0D, 8'h00);
    for (int k = 0; k < N_IN / 2; k++) hword(16'h10, {pix[2*k+1], pix[2*k]});
    hwrite(16'h00, 8'h04);   // ack
  endtask

  // ------------------------------------------------------------ core BFM
  function automatic logic [31:0] mnn(input int f3, input int f7);
    return {7'(f7), 5'd11, 5'd10, 3'(f3), 5'd10, OPC_CUSTOM0};
  endfunction

  task automatic pcpi(input logic [31:0] insn, input logic [31:0] rs1,
                      input logic [31:0] rs2, output logic [31:0] rd);
    int n = 0;
    @(negedge clk);
    pcpi_valid = 1; pcpi_insn = insn; pcpi_rs1 = rs1; pcpi_rs2 = rs2;
    @(posedge clk);
    while (!pcpi_ready) begin
      if (n < 16) check(pcpi_wait || n < 1, "pcpi_wait raised while busy");
      n++;
      @(posedge clk);
    end
    rd = pcpi_rd;
    @(negedge clk);
    pcpi_valid = 0;
  endtask

  task automatic core_mem(input logic [31:0] a, input logic [31:0] wd,
                          input logic [3:0] strb, output logic [31:0] rdat);
    @(negedge clk);
    mem_valid = 1; mem_addr = a; mem_wdata = wd; mem_wstrb = strb;
    @(posedge clk);
    while (!mem_ready) @(posedge clk);
    rdat = mem_rdata;
    @(negedge clk);
    mem_valid = 0; mem_wstrb = 0;
  endtask

  int masked_layers = 0, clear_layers = 0, core_accesses = 0;
  longint layer_cycles [string];

  task automatic run_layer(input int f3, input bit men, input string tag,
                           output logic [31:0] rd);
    longint t0 = $time;
    pcpi(mnn(f3, 0), {31'b0, men}, 0, rd);
    layer_cycles[tag] = ($time - t0) / 10;
    if (men) masked_layers++; else clear_layers++;
  endtask

  task automatic inference(input bit m_il, input bit m_hl, input bit m_ol, output logic [31:0] rd,
                           output longint cycles);
    logic [31:0] dummy;
    longint t0;
    fork
      pcpi(mnn(F3_IFETCH, 0), IMG_A, N_IN / 2, dummy);
      host_pixels();
    join
    t0 = $time;
    pcpi(mnn(F3_CFGWR, CFG_IMAGE),  IMG_A, N_IN / 2, dummy);
    pcpi(mnn(F3_CFGWR, CFG_WEIGHT), W0_A, N_IN * N_H, dummy);
    pcpi(mnn(F3_CFGWR, CFG_BIAS),   BIAS_A, N_H, dummy);
    pcpi(mnn(F3_CFGWR, CFG_DIMS),   N_IN, N_H, dummy);
    run_layer(F3_ILAYER, m_il, "il", dummy);
    if (HAS_HL) begin
      pcpi(mnn(F3_CFGWR, CFG_WEIGHT), W1_A, N_H * N_H, dummy);
      pcpi(mnn(F3_CFGWR, CFG_DIMS),   N_H, N_H, dummy);
      run_layer(F3_HLAYER, m_hl, "hl", dummy);
    end
    pcpi(mnn(F3_CFGWR, CFG_WEIGHT), W2_A, N_H * N_OUT, dummy);
    pcpi(mnn(F3_CFGWR, CFG_DIMS),   N_H, N_OUT, dummy);
    run_layer(F3_OLAYER, m_ol, "ol", rd);
    cycles = ($time - t0) / 10;
  endtask

  task automatic check_result(input logic [31:0] rd, input bit m_ol, input string cfg);
    logic [31:0] r0, r1;
    logic [7:0]  st;
    logic [15:0] sc;
    logic [7:0]  cl;
    hread(16'h00, st);
    check(st[1], {cfg, ": result valid in STATUS"});
    hread32(16'h20, r0);
    hread32(16'h24, r1);
    check(rd == r0, {cfg, ": rd of mnn.olayer equals RESULT0"});
    check(r0[31] == m_ol, {cfg, ": masked flag"});
    sc = r0[15:0] ^ r1[15:0];
    cl = r0[23:16] ^ r1[23:16];
    check(cl == 8'(exp_cls), $sformatf("%s: class %0d expected %0d", cfg, cl, exp_cls));
    check(sc == exp_score, $sformatf("%s: score %h expected %h", cfg, sc, exp_score));
    if (!m_ol) check(r1 == {1'b0, 31'b0}, {cfg, ": clear result has zero share 1"});
  endtask

  // ------------------------------------------------------------ stimulus
  int phase2_runs = 0, soft_resets = 0, pingpong_swaps = 0, big_net_runs = 0;
  logic src_prev;
  always @(posedge clk) begin
    if (rst_n && dut.u_cp.u_snnu.src_q !== src_prev) pingpong_swaps++;
    src_prev <= dut.u_cp.u_snnu.src_q;
  end

  initial begin
    logic [31:0] rd, r;
    longint cyc_clear, cyc_masked, cyc;
    bit all_neg;

    set_net(64, 64, 10, 1);
    gen_net();

    repeat (3) @(negedge clk);
    rst_n = 1;
    hwrite(16'h00, 8'h01);   // software reset
    soft_resets++;
    romload();
    hwrite(16'h00, 8'h02);   // start
    @(negedge clk);
    check(core_resetn, "core released by start");

    // the core reads its first instruction word and writes a variable
    core_mem(32'h0, 0, 4'h0, r);
    check(r == 32'hDEAD_BEEF, "core reads romloaded word");
    core_mem(32'h8, 32'h1234_5678, 4'hF, r);
    core_mem(32'h8, 0, 4'h0, r);
    check(r == 32'h1234_5678, "core write/read back");
    core_accesses += 3;

    // C1: all clear
    inference(0, 0, 0, rd, cyc_clear);
    check_result(rd, 0, "C1");
    // C2: all masked
    inference(1, 1, 1, rd, cyc_masked);
    check_result(rd, 1, "C2");
    // C3: second hidden layer clear
    inference(1, 0, 1, rd, cyc);
    check_result(rd, 1, "C3");
    // C4: output layer clear
    inference(1, 1, 0, rd, cyc);
    check_result(rd, 0, "C4");

    $display("cycles: clear %0d masked %0d ratio %0.3f", cyc_clear, cyc_masked,
             real'(cyc_masked) / real'(cyc_clear));
    $display("layer cycles (C4): il %0d hl %0d ol %0d",
             layer_cycles["il"], layer_cycles["hl"], layer_cycles["ol"]);
    // dual datapath reuse: masked layers take about twice as long
    check(real'(cyc_masked) / real'(cyc_clear) > 1.6 &&
          real'(cyc_masked) / real'(cyc_clear) < 2.4, "masked/clear latency ratio near 2");
    // reference figures for this network: 4997 cycles clear, 10150 masked;
    // this implementation adds a few cycles of overhead per neuron
    check(cyc_clear >= 4997 && real'(cyc_clear) < 1.2 * 4997.0, "clear latency within 20% above 4997");
    check(cyc_masked >= 10150 && real'(cyc_masked) < 1.2 * 10150.0, "masked latency within 20% above 10150");

    // Second phase of the maximum search: make every score negative (at or
    // above K/2) by giving output neuron j weights that match the second
    // hidden layer in exactly 2*j+3 places.
    for (int j = 0; j < N_OUT; j++) begin
      int order [];
      order = new[N_H];
      for (int i = 0; i < N_H; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < N_H; i++) w2[j][i] = ~a1[i];
      for (int q = 0; q < 2 * ((j * 7) % N_OUT) + 3; q++) w2[j][order[q]] = a1[order[q]];
    end
    ref_model();
    all_neg = 1;
    for (int j = 0; j < N_OUT; j++) all_neg &= score[j][15];
    check(all_neg, "phase-2 stimulus has all scores above K/2");
    hwrite(16'h00, 8'h01);   // software reset before reloading
    soft_resets++;
    romload();
    hwrite(16'h00, 8'h02);
    inference(1, 1, 1, rd, cyc);
    check_result(rd, 1, "phase2 masked");
    phase2_runs++;
    inference(1, 1, 0, rd, cyc);
    check_result(rd, 0, "phase2 clear");
    phase2_runs++;

    // The comparison network 784-512-10 (one hidden layer, no mnn.hlayer),
    // clear and masked, at the default sizes of the design.
    set_net(784, 512, 10, 0);
    gen_net();
    hwrite(16'h00, 8'h01);
    soft_resets++;
    romload();
    hwrite(16'h00, 8'h02);
    inference(0, 0, 0, rd, cyc_clear);
    check_result(rd, 0, "784-512-10 clear");
    inference(1, 0, 1, rd, cyc_masked);
    check_result(rd, 1, "784-512-10 masked");
    big_net_runs += 2;
    $display("784-512-10 cycles: clear %0d masked %0d ratio %0.3f", cyc_clear, cyc_masked,
             real'(cyc_masked) / real'(cyc_clear));
    // 784*512 + 512*10 summations: at least half that many cycles when
    // clear (two per cycle), at least that many masked (one per cycle)
    check(cyc_clear >= (784 * 512 + 512 * 10) / 2 && real'(cyc_clear) < 1.2 * (784 * 512 + 512 * 10) / 2.0,
          "784-512-10 clear latency near two summations per cycle");
    check(cyc_masked >= 784 * 512 + 512 * 10 && real'(cyc_masked) < 1.2 * (784 * 512 + 512 * 10),
          "784-512-10 masked latency near one summation per cycle");

    // masked convolution, ReLU and maxpool
    for (int k = 0; k < 20; k++) begin
      logic [15:0] e, g;
      qc_prev = k[0];
      qconv_window(e, g);
      check(e == g, $sformatf("masked conv window %0d: got %h exp %h", k, g, e));
    end
    check(qconv_windows > 0, "masked convolution windows ran");
    check(relu_clips > 0, "masked ReLU clipped a negative sum");
    check(big_net_runs > 0, "784-512-10 network ran");
    check(qconv_b2a > 0, "convolution on shared previous-layer activations");

    check(masked_layers > 0, "masked layers ran");
    check(clear_layers > 0, "clear layers ran");
    check(pixel_fetches > 0, "pixel fetches happened");
    check(romloads > 0, "romload happened");
    check(soft_resets > 0, "software reset happened");
    check(phase2_runs > 0, "second max-search phase exercised");
    check(pingpong_swaps > 0, "activation memories ping-ponged");
    check(core_accesses > 0, "core memory accesses");
    $display("mechanisms: masked=%0d clear=%0d fetch=%0d romload=%0d softrst=%0d phase2=%0d swaps=%0d core=%0d qconv=%0d b2a=%0d clips=%0d",
             masked_layers, clear_layers, pixel_fetches, romloads, soft_resets,
             phase2_runs, pingpong_swaps, core_accesses, qconv_windows, qconv_b2a, relu_clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
