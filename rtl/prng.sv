// prng: pseudo-random mask generator for the masking gadgets.
//
// Delivers W fresh pseudo-random bits every cycle in which en_i is high.
// It is built from ceil(W/64) independent xorshift64 generators
// (x ^= x << 13; x ^= x >> 7; x ^= x << 17), each seeded from SEED and its
// lane number at reset; their outputs are concatenated and truncated to W.
// The document only says that fresh masks come from a PRNG; the generator
// type, its seeding and its width are this design's choices. A deployed
// device would load the seed from a true random source.
module prng #(
  parameter int unsigned  W    = 64,
  parameter logic [63:0]  SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,
  output logic [W-1:0] rnd_o
);

  localparam int unsigned LANES = (W + 63) / 64;

  logic [LANES*64-1:0] all;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [63:0] s_q, t1, t2, t3;
    assign t1 = s_q ^ (s_q << 13);
    assign t2 = t1 ^ (t1 >> 7);
    assign t3 = t2 ^ (t2 << 17);
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) s_q <= SEED ^ (64'(l + 1) * 64'hD1B5_4A32_D192_ED03);
      else if (en_i) s_q <= t3;
    end
    assign all[l*64 +: 64] = s_q;
  end

  assign rnd_o = all[W-1:0];

  if (LANES * 64 > W) begin : g_unused
    logic unused;
    assign unused = ^all[LANES*64-1:W];
  end

endmodule
