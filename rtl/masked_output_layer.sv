// masked_output_layer: thresholded maximum search on masked scores.
//
// Each output-layer score arrives as arithmetic shares (sc0 + sc1 mod 2**W).
// The block keeps the running maximum and its class only as Boolean shares
// and returns Boolean shares of both.
//
// Per score (one at a time, busy_o high meanwhile):
//   1. arithmetic-to-Boolean conversion through the shared masked
//      Kogge-Stone adder (x = (sc0, 0), y = (0, sc1));
//   2. the key is the score with its MSB inverted (a public XOR on share 0);
//      with it one unsigned comparison does the document's two phases at
//      once: scores below K/2 rank above the others, and with none below
//      K/2 the largest of all wins;
//   3. the same adder compares: max + ~key + 1 carries out iff max >= key,
//      so the shared select bit is sel = ~carry (new key strictly greater);
//   4. masked multiplexers (DOM AND) pick {key, class} or keep the old pair;
//      the class of the new score is its public index.
// first_i loads the score without comparing and restarts the index at 0.
//
// Timing: accepted when valid_i and !busy_o; done_o pulses when the stored
// maximum is updated, 2*ks_levels(W) + 6 cycles after acceptance, or
// ks_levels(W) + 2 cycles for a first score. rnd_i needs
// ks_rnd_bits(W) + W + CW fresh bits per cycle. Masked comparator and
// masked multiplexer follow the document; merging the two phases into one
// ordering key and reusing one adder for conversion and comparison are this
// design's choices.
module masked_output_layer
  import snn_pkg::*;
#(
  parameter int unsigned W   = DW,
  parameter int unsigned CW  = 8,
  parameter int unsigned KSR = ks_rnd_bits(W),
  parameter int unsigned RND = KSR + W + CW
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           valid_i,
  input  logic           first_i,
  input  logic [W-1:0]   sc0_i,
  input  logic [W-1:0]   sc1_i,
  input  logic [RND-1:0] rnd_i,
  output logic           busy_o,
  output logic           done_o,
  output logic [W-1:0]   max0_o,
  output logic [W-1:0]   max1_o,
  output logic [CW-1:0]  cls0_o,
  output logic [CW-1:0]  cls1_o
);

  localparam logic [W-1:0] HALF = W'(1) << (W - 1);

  typedef enum logic [2:0] {
    S_IDLE, S_A2B, S_CMP_ISSUE, S_CMP, S_MUX_ISSUE, S_MUX
  } state_e;
  state_e state_q;

  logic          first_q;
  logic [CW-1:0] idx_q, cur_idx_q;
  logic [W-1:0]  new0_q, new1_q, key0_q, key1_q;
  logic [CW-1:0] c0_q, c1_q;
  logic          sel0_q, sel1_q;

  // Shared adder, inputs chosen by state.
  logic         ks_vi, ks_vo, co0, co1;
  logic [W-1:0] x0, x1, y0, y1, s0, s1;
  logic         cin;

  always_comb begin
    ks_vi = 1'b0;
    x0 = sc0_i; x1 = '0; y0 = '0; y1 = sc1_i; cin = 1'b0;
    if (state_q == S_IDLE) begin
      ks_vi = valid_i;
    end else if (state_q == S_CMP_ISSUE) begin
      ks_vi = 1'b1;
      x0 = key0_q;  x1 = key1_q;
      y0 = ~new0_q; y1 = new1_q;
      cin = 1'b1;
    end
  end

  masked_ks_adder #(.W(W)) u_ks (
    .clk_i, .rst_ni, .valid_i(ks_vi),
    .x0_i(x0), .x1_i(x1), .y0_i(y0), .y1_i(y1), .cin_i(cin),
    .rnd_i(rnd_i[KSR-1:0]), .valid_o(ks_vo),
    .s0_o(s0), .s1_o(s1), .co0_o(co0), .co1_o(co1)
  );

  logic [W+CW-1:0] mo0, mo1;
  masked_mux #(.W(W + CW)) u_mux (
    .clk_i,
    .sel0_i(sel0_q), .sel1_i(sel1_q),
    .a0_i({new0_q, cur_idx_q}), .a1_i({new1_q, {CW{1'b0}}}),
    .b0_i({key0_q, c0_q}),      .b1_i({key1_q, c1_q}),
    .r_i(rnd_i[KSR +: W + CW]),
    .o0_o(mo0), .o1_o(mo1)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_IDLE;
      first_q   <= 1'b0;
      idx_q     <= '0;
      cur_idx_q <= '0;
      new0_q    <= '0;
      new1_q    <= '0;
      key0_q    <= '0;
      key1_q    <= '0;
      c0_q      <= '0;
      c1_q      <= '0;
      sel0_q    <= 1'b0;
      sel1_q    <= 1'b0;
      done_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (valid_i) begin
          first_q   <= first_i;
          cur_idx_q <= first_i ? '0 : idx_q;
          idx_q     <= (first_i ? '0 : idx_q) + 1'b1;
          state_q   <= S_A2B;
        end
        S_A2B: if (ks_vo) begin
          if (first_q) begin
            key0_q  <= s0 ^ HALF;
            key1_q  <= s1;
            c0_q    <= cur_idx_q;
            c1_q    <= '0;
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            new0_q  <= s0 ^ HALF;
            new1_q  <= s1;
            state_q <= S_CMP_ISSUE;
          end
        end
        S_CMP_ISSUE: state_q <= S_CMP;
        S_CMP: if (ks_vo) begin
          sel0_q  <= ~co0;
          sel1_q  <= co1;
          state_q <= S_MUX_ISSUE;
        end
        S_MUX_ISSUE: state_q <= S_MUX;
        S_MUX: begin
          {key0_q, c0_q} <= mo0;
          {key1_q, c1_q} <= mo1;
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state_q != S_IDLE);
  assign max0_o = key0_q ^ HALF;
  assign max1_o = key1_q;
  assign cls0_o = c0_q;
  assign cls1_o = c1_q;

endmodule
