// masked_qconv_unit: masked datapath for a higher-precision (8-bit)
// convolutional layer: convolution, ReLU and maxpool, all first-order masked.
//
// Each input pixel p (8-bit signed) is split on the fly into arithmetic
// shares (p - r, r) with fresh r. An input that is the activation of a
// previous masked layer arrives instead as Boolean shares (prev_i = 1,
// act0_i/act1_i) and is turned into arithmetic shares by b2a_word. Both
// shares are multiplied by the same
// 8-bit signed weight and accumulated in two separate accumulators mod
// 2**W, the first one preloaded with the bias. At the end of a convolution
// the two sums go to masked_relu (A2B, then DOM AND with the inverted MSB)
// and its Boolean-shared output to masked_maxpool, which keeps the largest
// activation of the pooling window. Shares are never recombined.
//
// Interface: start_i loads bias_i and clears the second share; each
// valid_i cycle accumulates one product of wgt_i with pix_i (prev_i = 0,
// one cycle later) or with the value shared on act0_i/act1_i (prev_i = 1,
// ks_levels(W) + 4 cycles later); the two kinds are not mixed within one
// convolution;
// conv_end_i (with pool_first_i for the first convolution of a window)
// hands the sum to the activation, and is allowed only while ready_o is
// high. After pool_done_o the window maximum is on max0_o/max1_o.
// Timing: one product per cycle in either mode; from conv_end_i to
// pool_done_o
// ks_levels(W) + 3 cycles for a window's first value, 2*ks_levels(W) + 6
// for the others.
// The dataflow (masking of pixels, B2A of the previous layer's shared
// activations, share-wise MACs, A2B, masked ReLU and masked maxpool)
// follows the document's higher-precision extension. The input is 8-bit
// pixels or W-bit activations; the sequencing over kernels and windows
// is left to whoever drives the ports.
module masked_qconv_unit
  import snn_pkg::*;
#(
  parameter int unsigned W    = DW,
  parameter logic [63:0] SEED = 64'h0F1E_2D3C_4B5A_6978
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [W-1:0] bias_i,
  input  logic         valid_i,
  input  logic [7:0]   pix_i,
  input  logic         prev_i,
  input  logic [W-1:0] act0_i,
  input  logic [W-1:0] act1_i,
  input  logic [7:0]   wgt_i,
  input  logic         conv_end_i,
  input  logic         pool_first_i,
  output logic         ready_o,
  output logic         pool_done_o,
  output logic [W-1:0] max0_o,
  output logic [W-1:0] max1_o
);

  localparam int unsigned KSR  = ks_rnd_bits(W);
  localparam int unsigned RR   = KSR + W - 1;   // masked_relu
  localparam int unsigned MR   = KSR + W;       // masked_maxpool
  localparam int unsigned BR   = W + KSR;       // b2a_word
  localparam int unsigned LB   = ks_levels(W) + 3;
  localparam int unsigned RNDW = W + RR + MR + BR;

  logic [RNDW-1:0] rnd;
  prng #(.W(RNDW), .SEED(SEED)) u_prng (.clk_i, .rst_ni, .en_i(1'b1), .rnd_o(rnd));

  logic [W-1:0]  r_pix;
  logic [RR-1:0] r_relu;
  logic [MR-1:0] r_pool;
  logic [BR-1:0] r_b2a;
  assign {r_b2a, r_pool, r_relu, r_pix} = rnd;

  // previous-layer activations: Boolean to arithmetic shares, with the
  // weight delayed alongside
  logic         b2a_v;
  logic [W-1:0] b2a_a0, b2a_a1;
  b2a_word #(.W(W)) u_b2a (
    .clk_i, .rst_ni, .valid_i(valid_i && prev_i), .b0_i(act0_i), .b1_i(act1_i),
    .rnd_i(r_b2a), .valid_o(b2a_v), .a0_o(b2a_a0), .a1_o(b2a_a1)
  );

  logic [LB-1:0]      wd_v_q;
  logic [LB-1:0][7:0] wd_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wd_v_q <= '0; wd_q <= '0;
    end else begin
      wd_v_q <= {wd_v_q[LB-2:0], valid_i && prev_i};
      wd_q   <= {wd_q[LB-2:0], wgt_i};
    end
  end

  // operand registers: pixel shares and weight
  logic         op_v_q;
  logic [W-1:0] op_x0_q, op_x1_q, op_w_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      op_v_q <= 1'b0; op_x0_q <= '0; op_x1_q <= '0; op_w_q <= '0;
    end else begin
      op_v_q <= (valid_i && !prev_i) || b2a_v;
      if (b2a_v) begin
        op_x0_q <= b2a_a0;
        op_x1_q <= b2a_a1;
        op_w_q  <= W'($signed(wd_q[LB-1]));
      end else begin
        op_x0_q <= W'($signed(pix_i)) - r_pix;
        op_x1_q <= r_pix;
        op_w_q  <= W'($signed(wgt_i));
      end
    end
  end

  // share-wise multiply-accumulate
  logic [W-1:0] acc0_q, acc1_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      acc0_q <= '0; acc1_q <= '0;
    end else if (start_i) begin
      acc0_q <= bias_i; acc1_q <= '0;
    end else if (op_v_q) begin
      acc0_q <= acc0_q + W'(op_x0_q * op_w_q);
      acc1_q <= acc1_q + W'(op_x1_q * op_w_q);
    end
  end

  // activation
  logic         relu_v, pool_first_q, in_flight_q;
  logic [W-1:0] y0, y1;
  masked_relu #(.W(W)) u_relu (
    .clk_i, .rst_ni, .valid_i(conv_end_i), .s0_i(acc0_q), .s1_i(acc1_q),
    .rnd_i(r_relu), .valid_o(relu_v), .y0_o(y0), .y1_o(y1)
  );

  logic pool_busy;
  masked_maxpool #(.W(W)) u_pool (
    .clk_i, .rst_ni, .valid_i(relu_v), .first_i(pool_first_q),
    .v0_i(y0), .v1_i(y1), .rnd_i(r_pool),
    .busy_o(pool_busy), .done_o(pool_done_o), .max0_o(max0_o), .max1_o(max1_o)
  );

  // one activation in flight between conv_end_i and the pool update
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      in_flight_q  <= 1'b0;
      pool_first_q <= 1'b0;
    end else if (conv_end_i) begin
      in_flight_q  <= 1'b1;
      pool_first_q <= pool_first_i;
    end else if (pool_done_o) begin
      in_flight_q  <= 1'b0;
    end
  end

  assign ready_o = !in_flight_q && !pool_busy && !op_v_q && !(|wd_v_q) && !b2a_v;

  assert property (@(posedge clk_i) disable iff (!rst_ni) conv_end_i |-> ready_o);
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(valid_i && !prev_i && b2a_v));

endmodule
