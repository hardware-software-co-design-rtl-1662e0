// snnu: secure neural network unit of the coprocessor.
//
// Computes one layer of a binarized neural network per start_i pulse,
// either masked (first-order, against power and EM side channels) or in
// clear, chosen per layer by men_i. All sums are taken mod K = 2**W.
//
// Layers (selected by layer_i):
//   * input: 16-bit pixels (two per 32-bit memory word, even pixel in the
//     low half) times binary weights (1 = +1, 0 = -1), plus a bias per
//     neuron, then the sign activation (1 when the sum is below K/2);
//   * hidden: XNOR-popcount of the previous layer's activations with the
//     weights (each XNOR bit counts +1 or -1), then the sign activation;
//   * output: as hidden, but the raw scores go to the maximum search.
// Weights of neuron j start at word weight.ptr/4 + j*ceil(n_in/32); input i
// is bit i%32 of word i/32 of that row. Biases are 32-bit words, one per
// neuron, of which the low W bits are used. dims.ptr is the number of
// inputs of the layer (even), dims.size the number of neurons.
//
// Runtime dual datapath reuse: two MAC units. Unmasked, each beat feeds
// the even partial product to MAC0 and the odd one to MAC1, two products
// per cycle, and the neuron sum is MAC0 + MAC1. Masked, a pixel p becomes
// the arithmetic shares (p - r, r) with fresh r, one pixel per cycle (the
// tgl signal alternates lo and hi), and MAC0/MAC1 each accumulate one
// share. Hidden activations are kept as Boolean shares; masked, the weight
// is XNORed into share 0 and b2a_bit turns the shared bit b into
// arithmetic shares that the MACs add as 2*a0 - 1 and 2*a1. Unmasked, the
// registered shares are recombined by XOR first. At the MAC outputs a
// registered demultiplexer passes zero to the adder in masked mode, so the
// two shares are never added; the shares go to masked_actfn (hidden and
// input layers) or masked_output_layer (output layer), otherwise the clear
// sum goes to a sign test or unmasked_output_layer.
//
// Two activation memories ping-pong: the input layer writes memory 0 and
// each later layer reads the memory written last and writes the other.
//
// Interfaces: configuration register writes (cfg_we_i, cfg_idx_i, pointer,
// size); start_i/layer_i/men_i to start, done_o pulses at the end. Memory
// ports A (pixels) and B (weights, biases) are word-addressed with a fixed
// read latency of one cycle; the SNNU owns them while busy_o is high.
// After an output layer, res_* hold the Boolean shares (share 1 is zero if
// unmasked) of the winning score and class; res_masked_o tells which unit
// produced them.
//
// Timing per neuron: ceil(n_in/2) beats unmasked, n_in beats masked, plus
// a constant overhead for pipeline drain and activation. The structure
// (two MACs, tgl/m_en multiplexing, demux registers, B2A and recombination,
// two activation memories, separate unmasked output unit) follows the
// document; the memory layout, pipeline depths and the control sequence are
// this design's choices.
module snnu
  import snn_pkg::*;
#(
  parameter int unsigned W         = DW,
  parameter int unsigned MAX_NODES = 512,
  parameter int unsigned AW        = 14,
  parameter int unsigned CW        = 8,
  parameter logic [63:0] SEED      = 64'h0123_4567_89AB_CDEF
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // configuration register writes (mnn.cfgwr)
  input  logic          cfg_we_i,
  input  cfg_idx_e      cfg_idx_i,
  input  logic [31:0]   cfg_ptr_i,
  input  logic [31:0]   cfg_size_i,
  // layer trigger (mnn.ilayer / hlayer / olayer)
  input  logic          start_i,
  input  layer_e        layer_i,
  input  logic          men_i,
  output logic          busy_o,
  output logic          done_o,
  // memory port A: pixels
  output logic          pa_re_o,
  output logic [AW-1:0] pa_addr_o,
  input  logic [31:0]   pa_rdata_i,
  // memory port B: weights and biases
  output logic          pb_re_o,
  output logic [AW-1:0] pb_addr_o,
  input  logic [31:0]   pb_rdata_i,
  // classification result
  output logic          res_masked_o,
  output logic [W-1:0]  res_score0_o,
  output logic [W-1:0]  res_score1_o,
  output logic [CW-1:0] res_cls0_o,
  output logic [CW-1:0] res_cls1_o,
  // configuration read-back (image pointer, for pixel writes)
  output cfg_t          cfg_o
);

  localparam int unsigned DEPTH = MAX_NODES / 2;
  localparam int unsigned MAW   = $clog2(DEPTH);
  localparam int unsigned NW    = $clog2(MAX_NODES) + 1;
  localparam int unsigned KSR   = ks_rnd_bits(W);
  localparam int unsigned OLR   = KSR + W + CW;
  localparam int unsigned B2R   = W + 1;
  localparam int unsigned RNDW  = W + B2R + KSR + OLR;

  // ---------------------------------------------------------------- config
  cfg_t cfg_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) cfg_q <= '0;
    else if (cfg_we_i) begin
      unique case (cfg_idx_i)
        CFG_IMAGE:  cfg_q.image  <= '{ptr: cfg_ptr_i, size: cfg_size_i};
        CFG_WEIGHT: cfg_q.weight <= '{ptr: cfg_ptr_i, size: cfg_size_i};
        CFG_BIAS:   cfg_q.bias   <= '{ptr: cfg_ptr_i, size: cfg_size_i};
        CFG_DIMS:   cfg_q.dims   <= '{ptr: cfg_ptr_i, size: cfg_size_i};
        default: ;
      endcase
    end
  end
  assign cfg_o = cfg_q;

  // ---------------------------------------------------------------- PRNG
  logic [RNDW-1:0] rnd;
  prng #(.W(RNDW), .SEED(SEED)) u_prng (
    .clk_i, .rst_ni, .en_i(1'b1), .rnd_o(rnd)
  );
  logic [W-1:0]   rnd_pix;
  logic [B2R-1:0] rnd_b2a;
  logic [KSR-1:0] rnd_act;
  logic [OLR-1:0] rnd_ol;
  assign {rnd_ol, rnd_act, rnd_b2a, rnd_pix} = rnd;

  // ---------------------------------------------------------------- control
  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_BIAS, S_RUN, S_DRAIN, S_SUM, S_ACT, S_ACTWAIT,
    S_OLWAIT, S_NEXT
  } state_e;
  state_e state_q;

  layer_e        layer_q;
  logic          men_q;
  logic          src_q;       // activation memory written last
  logic [NW-1:0] node_q, n_out_q;
  logic [NW-1:0] beat_k_q, n_pairs_q;
  logic          tgl_q;
  logic [AW-1:0] wrow_q, wpn_q;

  logic          is_input;
  assign is_input = (layer_q == LAYER_INPUT);

  logic          beat_v;      // a beat issued this cycle
  logic          last_beat;
  assign beat_v    = (state_q == S_RUN);
  assign last_beat = (beat_k_q == n_pairs_q - 1'b1) && (!men_q || tgl_q);

  // Memory requests. Port A: pixel word k, issued on the first beat of a
  // pair. Port B: bias in S_INIT, weight word otherwise.
  logic [AW-1:0] img_base, bias_base;
  assign img_base  = cfg_q.image.ptr[AW+1:2];
  assign bias_base = cfg_q.bias.ptr[AW+1:2];

  always_comb begin
    pa_re_o   = beat_v && !tgl_q && is_input;
    pa_addr_o = img_base + AW'(beat_k_q);
    pb_re_o   = 1'b0;
    pb_addr_o = wrow_q + AW'(beat_k_q >> 4);
    if (state_q == S_INIT && is_input) begin
      pb_re_o   = 1'b1;
      pb_addr_o = bias_base + AW'(node_q);
    end else if (beat_v && !tgl_q) begin
      pb_re_o = 1'b1;
    end
  end

  // ---------------------------------------------------------------- stage 1
  // Beat information one cycle after issue, when memory data is valid.
  logic          s1_v, s1_tgl;
  logic [3:0]    s1_sub;      // pair index inside the weight word
  logic          s2_v, s2_tgl;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s1_v <= 1'b0; s1_tgl <= 1'b0; s1_sub <= '0;
      s2_v <= 1'b0; s2_tgl <= 1'b0;
    end else begin
      s1_v   <= beat_v;
      s1_tgl <= tgl_q;
      s1_sub <= beat_k_q[3:0];
      s2_v   <= s1_v;
      s2_tgl <= s1_tgl;
    end
  end

  // hi/lo registers: pixel pair, activation pair and weight pair, loaded
  // by the first beat of each pair.
  logic [W-1:0] lo_q, hi_q;
  logic [3:0]   actw_q;
  logic         wlo_q, whi_q;
  logic [3:0]   act_rdata;

  always_ff @(posedge clk_i) begin
    if (s1_v && !s1_tgl) begin
      lo_q   <= W'($signed(pa_rdata_i[15:0]));
      hi_q   <= W'($signed(pa_rdata_i[31:16]));
      actw_q <= act_rdata;
      wlo_q  <= pb_rdata_i[{s1_sub, 1'b0}];
      whi_q  <= pb_rdata_i[{s1_sub, 1'b1}];
    end
  end

  // ---------------------------------------------------------------- stage 2
  // Operand selection. Boolean shares of the selected activation, with the
  // weight XNORed into share 0 (masked hidden/output layers).
  logic         w_sel, a_s0, a_s1;
  assign w_sel = s2_tgl ? whi_q : wlo_q;
  assign a_s0  = (s2_tgl ? actw_q[2] : actw_q[0]) ~^ w_sel;
  assign a_s1  = s2_tgl ? actw_q[3] : actw_q[1];

  logic         b2a_vi, b2a_vo;
  logic [W-1:0] b2a_a0, b2a_a1;
  assign b2a_vi = s2_v && men_q && !is_input;

  b2a_bit #(.W(W)) u_b2a (
    .clk_i, .rst_ni, .valid_i(b2a_vi), .b0_i(a_s0), .b1_i(a_s1),
    .rnd_i(rnd_b2a), .valid_o(b2a_vo), .a0_o(b2a_a0), .a1_o(b2a_a1)
  );

  // Recombination for unmasked hidden layers: the shares pass a register
  // (recomb) before they are XORed, then XNOR with the weight.
  logic [3:0] rc_q;
  logic       rc_v_q;
  logic       rc_wlo_q, rc_whi_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rc_q <= '0; rc_v_q <= 1'b0; rc_wlo_q <= 1'b0; rc_whi_q <= 1'b0;
    end else begin
      rc_q     <= men_q ? 4'b0000 : actw_q;
      rc_v_q   <= s2_v && !men_q && !is_input;
      rc_wlo_q <= wlo_q;
      rc_whi_q <= whi_q;
    end
  end
  logic xn_lo, xn_hi;
  assign xn_lo = (rc_q[0] ^ rc_q[1]) ~^ rc_wlo_q;
  assign xn_hi = (rc_q[2] ^ rc_q[3]) ~^ rc_whi_q;

  // Operand register in front of the MACs.
  logic         op_v_q, op_neg0_q, op_neg1_q;
  logic [W-1:0] op_x0_q, op_x1_q;
  logic [W-1:0] pix;
  assign pix = s2_tgl ? hi_q : lo_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      op_v_q <= 1'b0; op_neg0_q <= 1'b0; op_neg1_q <= 1'b0;
      op_x0_q <= '0; op_x1_q <= '0;
    end else begin
      op_v_q <= 1'b0;
      if (is_input && s2_v) begin
        op_v_q <= 1'b1;
        if (men_q) begin
          // arithmetic shares of one pixel, weight applied to both
          op_x0_q   <= pix - rnd_pix;
          op_x1_q   <= rnd_pix;
          op_neg0_q <= ~w_sel;
          op_neg1_q <= ~w_sel;
        end else begin
          op_x0_q   <= lo_q;
          op_x1_q   <= hi_q;
          op_neg0_q <= ~wlo_q;
          op_neg1_q <= ~whi_q;
        end
      end else if (!is_input && men_q && b2a_vo) begin
        op_v_q    <= 1'b1;
        op_x0_q   <= (b2a_a0 << 1) - W'(1);
        op_x1_q   <= b2a_a1 << 1;
        op_neg0_q <= 1'b0;
        op_neg1_q <= 1'b0;
      end else if (!is_input && rc_v_q) begin
        op_v_q    <= 1'b1;
        op_x0_q   <= W'(1);
        op_x1_q   <= W'(1);
        op_neg0_q <= ~xn_lo;
        op_neg1_q <= ~xn_hi;
      end
    end
  end

  // ---------------------------------------------------------------- MACs
  logic         mac_clr;
  logic [W-1:0] mac_init, acc0, acc1;
  assign mac_clr  = (state_q == S_BIAS) || (state_q == S_INIT && !is_input);
  assign mac_init = (state_q == S_BIAS) ? pb_rdata_i[W-1:0] : '0;

  mac_unit #(.W(W)) u_mac0 (
    .clk_i, .rst_ni, .clr_i(mac_clr), .init_i(mac_init), .en_i(op_v_q),
    .x_i(op_x0_q), .neg_i(op_neg0_q), .acc_o(acc0)
  );
  mac_unit #(.W(W)) u_mac1 (
    .clk_i, .rst_ni, .clr_i(mac_clr), .init_i('0), .en_i(op_v_q),
    .x_i(op_x1_q), .neg_i(op_neg1_q), .acc_o(acc1)
  );

  // Registered demultiplexer: in masked mode the adder sees zeros, the
  // masked path sees the shares; in unmasked mode the reverse.
  logic [W-1:0] dm_sum0_q, dm_sum1_q, dm_sh0_q, dm_sh1_q, sum;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      dm_sum0_q <= '0; dm_sum1_q <= '0; dm_sh0_q <= '0; dm_sh1_q <= '0;
    end else begin
      dm_sum0_q <= men_q ? '0 : acc0;
      dm_sum1_q <= men_q ? '0 : acc1;
      dm_sh0_q  <= men_q ? acc0 : '0;
      dm_sh1_q  <= men_q ? acc1 : '0;
    end
  end
  assign sum = dm_sum0_q + dm_sum1_q;

  // ---------------------------------------------------------------- activation
  logic act_vi, act_vo, act_s0, act_s1;
  assign act_vi = (state_q == S_ACT) && men_q && (layer_q != LAYER_OUTPUT);

  masked_actfn #(.W(W)) u_actfn (
    .clk_i, .rst_ni, .valid_i(act_vi), .s0_i(dm_sh0_q), .s1_i(dm_sh1_q),
    .rnd_i(rnd_act), .valid_o(act_vo), .act0_o(act_s0), .act1_o(act_s1)
  );

  // ---------------------------------------------------------------- output
  logic          ol_first;
  assign ol_first = (node_q == '0);

  logic          mol_vi, mol_busy, mol_done;
  logic [W-1:0]  mol_max0, mol_max1;
  logic [CW-1:0] mol_cls0, mol_cls1;
  assign mol_vi = (state_q == S_ACT) && men_q && (layer_q == LAYER_OUTPUT);

  masked_output_layer #(.W(W), .CW(CW)) u_mol (
    .clk_i, .rst_ni, .valid_i(mol_vi), .first_i(ol_first),
    .sc0_i(dm_sh0_q), .sc1_i(dm_sh1_q), .rnd_i(rnd_ol),
    .busy_o(mol_busy), .done_o(mol_done),
    .max0_o(mol_max0), .max1_o(mol_max1), .cls0_o(mol_cls0), .cls1_o(mol_cls1)
  );

  logic          uol_vi;
  logic [W-1:0]  uol_max;
  logic [CW-1:0] uol_cls;
  assign uol_vi = (state_q == S_ACT) && !men_q && (layer_q == LAYER_OUTPUT);

  unmasked_output_layer #(.W(W), .CW(CW)) u_uol (
    .clk_i, .rst_ni, .valid_i(uol_vi), .first_i(ol_first), .score_i(sum),
    .max_score_o(uol_max), .class_o(uol_cls)
  );

  // ---------------------------------------------------------------- act mems
  logic          am_we;
  logic [1:0]    am_wdata;
  logic [3:0]    am_rdata [2];
  logic [MAW-1:0] am_raddr;

  always_comb begin
    am_we    = 1'b0;
    am_wdata = 2'b00;
    if (state_q == S_ACT && !men_q && layer_q != LAYER_OUTPUT) begin
      am_we    = 1'b1;
      am_wdata = {1'b0, ~sum[W-1]};
    end else if (state_q == S_ACTWAIT && act_vo) begin
      am_we    = 1'b1;
      am_wdata = {act_s1, act_s0};
    end
  end

  assign am_raddr = MAW'(beat_k_q);

  // Destination is memory 0 for the input layer, else the one not last
  // written.
  logic dst;
  assign dst = is_input ? 1'b0 : ~src_q;

  for (genvar m = 0; m < 2; m++) begin : g_am
    act_mem #(.DEPTH(DEPTH)) u_am (
      .clk_i,
      .we_i({2{am_we && (dst == 1'(m))}} & {node_q[0], ~node_q[0]}),
      .waddr_i(MAW'(node_q >> 1)),
      .wdata_i({am_wdata, am_wdata}),
      .raddr_i(am_raddr),
      .rdata_o(am_rdata[m])
    );
  end
  assign act_rdata = am_rdata[src_q];

  // ---------------------------------------------------------------- FSM
  // b2a_bit has two pipeline stages; track the middle one here.
  logic b2a_v1_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) b2a_v1_q <= 1'b0;
    else         b2a_v1_q <= b2a_vi;
  end

  logic pipe_busy;
  assign pipe_busy = s1_v || s2_v || rc_v_q || op_v_q || b2a_vi || b2a_v1_q
                   || b2a_vo;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_IDLE;
      layer_q   <= LAYER_INPUT;
      men_q     <= 1'b0;
      src_q     <= 1'b0;
      node_q    <= '0;
      n_out_q   <= '0;
      n_pairs_q <= '0;
      beat_k_q  <= '0;
      tgl_q     <= 1'b0;
      wrow_q    <= '0;
      wpn_q     <= '0;
      done_o    <= 1'b0;
      res_masked_o <= 1'b0;
      res_score0_o <= '0;
      res_score1_o <= '0;
      res_cls0_o   <= '0;
      res_cls1_o   <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          layer_q   <= layer_i;
          men_q     <= men_i;
          node_q    <= '0;
          n_out_q   <= NW'(cfg_q.dims.size);
          n_pairs_q <= NW'(cfg_q.dims.ptr >> 1);
          wpn_q     <= AW'((cfg_q.dims.ptr + 31) >> 5);
          wrow_q    <= cfg_q.weight.ptr[AW+1:2];
          state_q   <= S_INIT;
        end
        S_INIT: begin
          beat_k_q <= '0;
          tgl_q    <= 1'b0;
          state_q  <= is_input ? S_BIAS : S_RUN;
        end
        S_BIAS: state_q <= S_RUN;
        S_RUN: begin
          if (men_q) tgl_q <= ~tgl_q;
          if (!men_q || tgl_q) beat_k_q <= beat_k_q + 1'b1;
          if (last_beat) state_q <= S_DRAIN;
        end
        S_DRAIN: if (!pipe_busy) state_q <= S_SUM;
        S_SUM:   state_q <= S_ACT;   // demux registers settle
        S_ACT: begin
          if (men_q && layer_q != LAYER_OUTPUT) state_q <= S_ACTWAIT;
          else if (men_q)                       state_q <= S_OLWAIT;
          else                                  state_q <= S_NEXT;
        end
        S_ACTWAIT: if (act_vo) state_q <= S_NEXT;
        S_OLWAIT:  if (mol_done) state_q <= S_NEXT;
        S_NEXT: begin
          wrow_q <= wrow_q + wpn_q;
          if (node_q == n_out_q - 1'b1) begin
            state_q <= S_IDLE;
            done_o  <= 1'b1;
            if (layer_q == LAYER_OUTPUT) begin
              res_masked_o <= men_q;
              res_score0_o <= men_q ? mol_max0 : uol_max;
              res_score1_o <= men_q ? mol_max1 : '0;
              res_cls0_o   <= men_q ? mol_cls0 : uol_cls;
              res_cls1_o   <= men_q ? mol_cls1 : '0;
            end else begin
              src_q <= dst;
            end
          end else begin
            node_q  <= node_q + 1'b1;
            state_q <= S_INIT;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state_q != S_IDLE);

  // Accepted only when idle; the masked output unit is never busy here.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   (state_q == S_ACT && men_q && layer_q == LAYER_OUTPUT) |-> !mol_busy);

endmodule
