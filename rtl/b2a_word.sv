// b2a_word: Boolean-to-arithmetic conversion of a W-bit shared value.
//
// Turns Boolean shares (b0, b1), b0 ^ b1 = x, into arithmetic shares
// (a0, a1), a0 + a1 = x mod 2**W. A fresh random word R is subtracted
// from x inside the masked Kogge-Stone adder (x given as (b0, b1), the
// addend -R as (-R, 0)); the Boolean shares of x - R are then XORed
// together behind the adder's output registers. x - R is uniformly
// distributed and independent of x, so a0 = x - R and a1 = R reveal
// nothing about x on their own. The two Boolean shares of x - R are
// registered on their own before they are XORed, so that glitches in the
// carry logic cannot combine partial terms of both shares (the carries of
// x - R alone would depend on x).
//
// Timing: pipelined, one value per cycle, latency ks_levels(W) + 3 cycles
// from valid_i to valid_o. rnd_i needs W + ks_rnd_bits(W) fresh bits per
// cycle: [W-1:0] is R, the rest feeds the adder's DOM AND gates.
// The document places a B2A unit in front of the multipliers for the
// activations of a previous layer, without giving its insides; this
// construction is this design's own.
module b2a_word
  import snn_pkg::*;
#(
  parameter int unsigned W   = DW,
  parameter int unsigned KSR = ks_rnd_bits(W),
  parameter int unsigned RND = W + KSR
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           valid_i,
  input  logic [W-1:0]   b0_i,
  input  logic [W-1:0]   b1_i,
  input  logic [RND-1:0] rnd_i,
  output logic           valid_o,
  output logic [W-1:0]   a0_o,
  output logic [W-1:0]   a1_o
);

  localparam int unsigned LAT = ks_levels(W) + 1;

  logic [W-1:0] r;
  assign r = rnd_i[W-1:0];

  logic         ks_v, co0, co1;
  logic [W-1:0] s0, s1;
  masked_ks_adder #(.W(W)) u_add (
    .clk_i, .rst_ni, .valid_i,
    .x0_i(b0_i), .x1_i(b1_i), .y0_i(W'(0) - r), .y1_i('0), .cin_i(1'b0),
    .rnd_i(rnd_i[W +: KSR]),
    .valid_o(ks_v), .s0_o(s0), .s1_o(s1), .co0_o(co0), .co1_o(co1)
  );

  // R travels alongside the adder and the share registers
  logic [LAT:0][W-1:0] r_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) r_q <= '0;
    else begin
      r_q[0] <= r;
      for (int k = 1; k <= LAT; k++) r_q[k] <= r_q[k-1];
    end
  end

  logic         sv_q;
  logic [W-1:0] s0_q, s1_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sv_q    <= 1'b0;
      s0_q    <= '0;
      s1_q    <= '0;
      valid_o <= 1'b0;
      a0_o    <= '0;
      a1_o    <= '0;
    end else begin
      sv_q    <= ks_v;
      s0_q    <= s0;
      s1_q    <= s1;
      valid_o <= sv_q;
      a0_o    <= s0_q ^ s1_q;
      a1_o    <= r_q[LAT];
    end
  end

  logic unused;
  assign unused = co0 ^ co1;

endmodule
