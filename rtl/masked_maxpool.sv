// masked_maxpool: masked maximum over a pooling window.
//
// Values (non-negative ReLU outputs) arrive one at a time as Boolean shares.
// first_i starts a window and loads the value; every further value is
// compared with the stored maximum by the masked comparator
// (masked_ks_adder computing max + ~v + 1, whose carry out is max >= v)
// and a masked multiplexer (DOM AND) keeps the larger one. Only shares are
// ever stored.
//
// Timing: accepted when valid_i and !busy_o; done_o pulses when the stored
// maximum is updated: 1 cycle after a first value, ks_levels(W) + 4 cycles
// after any other. rnd_i needs ks_rnd_bits(W) + W fresh bits per cycle.
// Masked comparator and masked multiplexer follow the document; it is an
// extension of the binarized design for higher-precision networks.
module masked_maxpool
  import snn_pkg::*;
#(
  parameter int unsigned W   = DW,
  parameter int unsigned KSR = ks_rnd_bits(W),
  parameter int unsigned RND = KSR + W
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           valid_i,
  input  logic           first_i,
  input  logic [W-1:0]   v0_i,
  input  logic [W-1:0]   v1_i,
  input  logic [RND-1:0] rnd_i,
  output logic           busy_o,
  output logic           done_o,
  output logic [W-1:0]   max0_o,
  output logic [W-1:0]   max1_o
);

  typedef enum logic [1:0] {S_IDLE, S_CMP, S_MUX_ISSUE, S_MUX} state_e;
  state_e state_q;

  logic [W-1:0] new0_q, new1_q;
  logic         sel0_q, sel1_q;
  logic         ks_vi, ks_vo, co0, co1;
  logic [W-1:0] s0, s1;

  assign ks_vi = (state_q == S_IDLE) && valid_i && !first_i;

  masked_ks_adder #(.W(W)) u_cmp (
    .clk_i, .rst_ni, .valid_i(ks_vi),
    .x0_i(max0_o), .x1_i(max1_o), .y0_i(~v0_i), .y1_i(v1_i), .cin_i(1'b1),
    .rnd_i(rnd_i[KSR-1:0]), .valid_o(ks_vo),
    .s0_o(s0), .s1_o(s1), .co0_o(co0), .co1_o(co1)
  );

  logic [W-1:0] mo0, mo1;
  masked_mux #(.W(W)) u_mux (
    .clk_i, .sel0_i(sel0_q), .sel1_i(sel1_q),
    .a0_i(new0_q), .a1_i(new1_q), .b0_i(max0_o), .b1_i(max1_o),
    .r_i(rnd_i[KSR +: W]), .o0_o(mo0), .o1_o(mo1)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      new0_q  <= '0;
      new1_q  <= '0;
      sel0_q  <= 1'b0;
      sel1_q  <= 1'b0;
      max0_o  <= '0;
      max1_o  <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (valid_i) begin
          if (first_i) begin
            max0_o <= v0_i;
            max1_o <= v1_i;
            done_o <= 1'b1;
          end else begin
            new0_q  <= v0_i;
            new1_q  <= v1_i;
            state_q <= S_CMP;
          end
        end
        S_CMP: if (ks_vo) begin
          sel0_q  <= ~co0;   // new value strictly larger
          sel1_q  <= co1;
          state_q <= S_MUX_ISSUE;
        end
        S_MUX_ISSUE: state_q <= S_MUX;
        S_MUX: begin
          max0_o  <= mo0;
          max1_o  <= mo1;
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state_q != S_IDLE);

  logic unused;
  assign unused = ^{s0, s1};

endmodule
