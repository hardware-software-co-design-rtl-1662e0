// tb_snnu: drives the secure neural network unit directly (configuration
// writes, layer triggers) with a word memory model that answers both ports
// one cycle after a read. A small network (40 pixels, two hidden layers of
// 12, 5 outputs; 40 inputs need two weight words per neuron) is computed
// for every masking pattern of the four layers and compared with a
// reference model; the hidden activations left in the activation memory are
// checked too. The rate is checked from the cycle counts of input layers
// with 40 and 80 pixels: 40 more pixels must cost exactly 20 cycles per
// neuron unmasked (two products per cycle) and 40 masked (one per cycle).
// The rates checked (two pixels per cycle clear, one masked) follow the
// document's datapath reuse; the per-neuron overhead is this design's.
module tb_snnu;
  import snn_pkg::*;
  localparam int AW = 14;
  localparam int NO = 5, NH = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          cfg_we = 0, start = 0, men = 0, busy, done;
  cfg_idx_e      cfg_idx = CFG_IMAGE;
  logic [31:0]   cfg_ptr = 0, cfg_size = 0;
  layer_e        layer = LAYER_INPUT;
  logic          pa_re, pb_re;
  logic [AW-1:0] pa_addr, pb_addr;
  logic [31:0]   pa_rdata, pb_rdata;
  logic          rmask;
  logic [15:0]   sc0, sc1;
  logic [7:0]    cl0, cl1;
  cfg_t          cfg;

  snnu dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cfg_we_i(cfg_we), .cfg_idx_i(cfg_idx), .cfg_ptr_i(cfg_ptr), .cfg_size_i(cfg_size),
    .start_i(start), .layer_i(layer), .men_i(men), .busy_o(busy), .done_o(done),
    .pa_re_o(pa_re), .pa_addr_o(pa_addr), .pa_rdata_i(pa_rdata),
    .pb_re_o(pb_re), .pb_addr_o(pb_addr), .pb_rdata_i(pb_rdata),
    .res_masked_o(rmask), .res_score0_o(sc0), .res_score1_o(sc1),
    .res_cls0_o(cl0), .res_cls1_o(cl1), .cfg_o(cfg));

  logic [31:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (pa_re) pa_rdata <= mem[pa_addr];
    if (pb_re) pb_rdata <= mem[pb_addr];
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word addresses
  localparam int IMG = 'h100, BIAS = 'h200, W0 = 'h300, W1 = 'h400, W2 = 'h500, W3 = 'h600;

  logic [15:0] pix [80];
  logic [15:0] bias [NH];
  bit wi [NH][80];
  bit wh1 [NH][NH], wh2 [NH][NH], wo [NO][NH];
  bit a0 [NH], a1 [NH], a2 [NH];
  logic [15:0] escore;
  int ecls;

  task automatic cfgw(input cfg_idx_e i, input logic [31:0] p, input logic [31:0] s);
    @(negedge clk);
    cfg_we = 1; cfg_idx = i; cfg_ptr = p; cfg_size = s;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic layer_run(input layer_e l, input bit m, output int cycles);
    @(negedge clk);
    start = 1; layer = l; men = m;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  function automatic void load_mem(int nin);
    for (int k = 0; k < nin / 2; k++) mem[IMG + k] = {pix[2*k+1], pix[2*k]};
    for (int j = 0; j < NH; j++) mem[BIAS + j] = {{16{bias[j][15]}}, bias[j]};
    for (int j = 0; j < NH; j++)
      for (int m = 0; m < (nin + 31) / 32; m++)
        for (int b = 0; b < 32; b++)
          mem[W0 + j*((nin+31)/32) + m][b] = (32*m + b < nin) ? wi[j][32*m+b] : 1'b0;
    for (int j = 0; j < NH; j++) begin
      mem[W1 + j] = 0; mem[W2 + j] = 0;
      for (int b = 0; b < NH; b++) begin mem[W1 + j][b] = wh1[j][b]; mem[W2 + j][b] = wh2[j][b]; end
    end
    for (int j = 0; j < NO; j++) begin
      mem[W3 + j] = 0;
      for (int b = 0; b < NH; b++) mem[W3 + j][b] = wo[j][b];
    end
  endfunction

  function automatic void ref_model(int nin);
    logic [15:0] s, key, best;
    for (int j = 0; j < NH; j++) begin
      s = bias[j];
      for (int i = 0; i < nin; i++) s = wi[j][i] ? s + pix[i] : s - pix[i];
      a0[j] = ~s[15];
    end
    for (int j = 0; j < NH; j++) begin
      s = 0;
      for (int i = 0; i < NH; i++) s = (a0[i] == wh1[j][i]) ? s + 1 : s - 1;
      a1[j] = ~s[15];
    end
    for (int j = 0; j < NH; j++) begin
      s = 0;
      for (int i = 0; i < NH; i++) s = (a1[i] == wh2[j][i]) ? s + 1 : s - 1;
      a2[j] = ~s[15];
    end
    for (int j = 0; j < NO; j++) begin
      s = 0;
      for (int i = 0; i < NH; i++) s = (a2[i] == wo[j][i]) ? s + 1 : s - 1;
      key = s ^ 16'h8000;
      if (j == 0 || key > best) begin best = key; escore = s; ecls = j; end
    end
  endfunction

  // activation j of the memory dut last wrote, recombined from its shares
  function automatic bit act_of(int j);
    logic [3:0] w;
    w = dut.src_q ? dut.g_am[1].u_am.mem[j/2] : dut.g_am[0].u_am.mem[j/2];
    return j[0] ? (w[2] ^ w[3]) : (w[0] ^ w[1]);
  endfunction

  task automatic inference(input logic [3:0] m, input int nin, output int cyc_in);
    int c;
    string tag;
    tag = $sformatf("mask %b nin %0d", m, nin);
    cfgw(CFG_IMAGE, IMG * 4, nin / 2);
    cfgw(CFG_WEIGHT, W0 * 4, nin * NH);
    cfgw(CFG_BIAS, BIAS * 4, NH);
    cfgw(CFG_DIMS, nin, NH);
    layer_run(LAYER_INPUT, m[0], cyc_in);
    for (int j = 0; j < NH; j++) check(act_of(j) == a0[j], {tag, ": input-layer activation"});
    cfgw(CFG_WEIGHT, W1 * 4, NH * NH);
    cfgw(CFG_DIMS, NH, NH);
    layer_run(LAYER_HIDDEN, m[1], c);
    for (int j = 0; j < NH; j++) check(act_of(j) == a1[j], {tag, ": hidden-1 activation"});
    cfgw(CFG_WEIGHT, W2 * 4, NH * NH);
    layer_run(LAYER_HIDDEN, m[2], c);
    for (int j = 0; j < NH; j++) check(act_of(j) == a2[j], {tag, ": hidden-2 activation"});
    cfgw(CFG_WEIGHT, W3 * 4, NH * NO);
    cfgw(CFG_DIMS, NH, NO);
    layer_run(LAYER_OUTPUT, m[3], c);
    check(rmask == m[3], {tag, ": result masked flag"});
    check((sc0 ^ sc1) == escore, $sformatf("%s: score %h exp %h", tag, sc0 ^ sc1, escore));
    check(int'(cl0 ^ cl1) == ecls, $sformatf("%s: class %0d exp %0d", tag, cl0 ^ cl1, ecls));
    if (!m[3]) check(sc1 == 0 && cl1 == 0, {tag, ": clear result share 1 zero"});
  endtask

  initial begin
    int c40u, c80u, c40m, c80m, c;
    for (int i = 0; i < 80; i++) pix[i] = 16'($urandom_range(0, 255));
    for (int j = 0; j < NH; j++) bias[j] = 16'($urandom_range(0, 400)) - 16'd200;
    foreach (wi[j, i]) wi[j][i] = $urandom_range(0, 1);
    foreach (wh1[j, i]) wh1[j][i] = $urandom_range(0, 1);
    foreach (wh2[j, i]) wh2[j][i] = $urandom_range(0, 1);
    foreach (wo[j, i]) wo[j][i] = $urandom_range(0, 1);
    load_mem(40);
    ref_model(40);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 16; m++) begin
      inference(4'(m), 40, c);
      if (m == 0) c40u = c;
      if (m == 15) c40m = c;
    end
    load_mem(80);
    ref_model(80);
    inference(4'b0000, 80, c80u);
    inference(4'b1111, 80, c80m);
    $display("input layer cycles: 40 px clear %0d masked %0d; 80 px clear %0d masked %0d",
             c40u, c40m, c80u, c80m);
    check(c80u - c40u == NH * 20, "clear rate: two products per cycle");
    check(c80m - c40m == NH * 40, "masked rate: one product per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
