// masked_actfn: masked sign activation of a binarized neural network.
//
// The weighted sum arrives as two arithmetic shares, s = s0 + s1 mod 2**W.
// With modular arithmetic the threshold is half the modulus, so the neuron
// fires (activation 1, i.e. +1) exactly when the MSB of s is 0. The MSB is
// obtained securely by a masked Kogge-Stone carry propagation built from
// DOM AND gates (masked_ks_adder with x = (s0, 0) and y = (0, s1)); its
// Boolean shares are inverted in one domain and registered once more so the
// gadget composes securely. Only Boolean shares of the activation leave
// the block; the sum is never recombined.
//
// Timing: pipelined, one sum per cycle, latency LAT = ks_levels(W) + 2
// cycles from valid_i to valid_o. rnd_i needs ks_rnd_bits(W) fresh bits
// per cycle. The thresholding by MSB and the DOM-based Kogge-Stone tree
// follow the document; the output register placement is this design's.
module masked_actfn
  import snn_pkg::*;
#(
  parameter int unsigned W   = DW,
  parameter int unsigned RND = ks_rnd_bits(W),
  parameter int unsigned LAT = ks_levels(W) + 2
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           valid_i,
  input  logic [W-1:0]   s0_i,
  input  logic [W-1:0]   s1_i,
  input  logic [RND-1:0] rnd_i,
  output logic           valid_o,
  output logic           act0_o,
  output logic           act1_o
);

  logic         ks_valid;
  logic [W-1:0] b0, b1;
  logic         co0, co1;

  masked_ks_adder #(.W(W)) u_a2b (
    .clk_i, .rst_ni, .valid_i,
    .x0_i(s0_i), .x1_i('0), .y0_i('0), .y1_i(s1_i), .cin_i(1'b0),
    .rnd_i, .valid_o(ks_valid), .s0_o(b0), .s1_o(b1), .co0_o(co0), .co1_o(co1)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_o <= 1'b0;
      act0_o  <= 1'b0;
      act1_o  <= 1'b0;
    end else begin
      valid_o <= ks_valid;
      act0_o  <= ~b0[W-1];
      act1_o  <= b1[W-1];
    end
  end

  // The carry out and the low sum bits are not needed for the sign.
  logic unused;
  assign unused = ^{co0, co1, b0[W-2:0], b1[W-2:0]};

endmodule
