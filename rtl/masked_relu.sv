// masked_relu: masked ReLU for quantized networks with modular arithmetic.
//
// ReLU_MOD(x) = 0 if x >= K/2, else x, with K = 2**W: an x at or above half
// the modulus stands for a negative sum. The sum arrives as arithmetic
// shares; masked_ks_adder converts them to Boolean shares (A2B), then
// every bit below the MSB is ANDed with the inverted MSB by DOM AND gates
// (the inversion is a public NOT on share 0). The MSB of the result is 0.
//
// Timing: pipelined, one value per cycle, latency ks_levels(W) + 2 cycles
// from valid_i to valid_o; rnd_i needs ks_rnd_bits(W) + W - 1 fresh bits
// per cycle. Function and structure (A2B, then DOM AND of the MSB with the
// other bits) follow the document; it is an extension of the binarized
// design for higher-precision networks and stands beside it in the top.
module masked_relu
  import snn_pkg::*;
#(
  parameter int unsigned W   = DW,
  parameter int unsigned KSR = ks_rnd_bits(W),
  parameter int unsigned RND = KSR + W - 1
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           valid_i,
  input  logic [W-1:0]   s0_i,
  input  logic [W-1:0]   s1_i,
  input  logic [RND-1:0] rnd_i,
  output logic           valid_o,
  output logic [W-1:0]   y0_o,
  output logic [W-1:0]   y1_o
);

  logic         ks_v, co0, co1;
  logic [W-1:0] b0, b1;

  masked_ks_adder #(.W(W)) u_a2b (
    .clk_i, .rst_ni, .valid_i,
    .x0_i(s0_i), .x1_i('0), .y0_i('0), .y1_i(s1_i), .cin_i(1'b0),
    .rnd_i(rnd_i[KSR-1:0]), .valid_o(ks_v),
    .s0_o(b0), .s1_o(b1), .co0_o(co0), .co1_o(co1)
  );

  logic [W-2:0] q0, q1;
  dom_and #(.W(W - 1)) u_and (
    .clk_i,
    .a0_i(b0[W-2:0]), .a1_i(b1[W-2:0]),
    .b0_i({(W-1){~b0[W-1]}}), .b1_i({(W-1){b1[W-1]}}),
    .r_i(rnd_i[KSR +: W-1]), .q0_o(q0), .q1_o(q1)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) valid_o <= 1'b0;
    else         valid_o <= ks_v;
  end

  assign y0_o = {1'b0, q0};
  assign y1_o = {1'b0, q1};

  logic unused;
  assign unused = co0 ^ co1;

endmodule
