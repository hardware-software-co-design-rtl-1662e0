// masked_ks_adder: first-order masked Kogge-Stone adder on Boolean shares.
//
// Adds two W-bit values given as Boolean shares, x = x0 ^ x1 and
// y = y0 ^ y1, plus a public carry-in, and returns Boolean shares of the
// sum (mod 2**W) and of the carry out. Generate bits g = x & y and every AND
// of the parallel-prefix tree use dom_and gadgets; propagate bits and the
// final sum are share-wise XORs. Because generate and propagate of one
// position are never both 1, the OR of the carry recurrence is an XOR.
//
// Uses:
//   * arithmetic-to-Boolean conversion: x = (a0, 0), y = (0, a1) turns the
//     arithmetic shares a0 + a1 into Boolean shares of the sum;
//   * masked comparison: x = b, y = ~a, cin = 1 gives carry out = (b >= a).
//
// Timing: fully pipelined, one result per cycle; LAT = 1 + log2(W) cycles
// from valid_i to valid_o. rnd_i must carry RND fresh random bits every
// cycle (snn_pkg::ks_rnd_bits). The use of a Kogge-Stone tree with DOM AND
// gates follows the document; the pipelining of every level is this
// design's own choice.
module masked_ks_adder
  import snn_pkg::*;
#(
  parameter int unsigned W   = 16,
  parameter int unsigned LVL = ks_levels(W),
  parameter int unsigned RND = ks_rnd_bits(W),
  parameter int unsigned LAT = LVL + 1
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           valid_i,
  input  logic [W-1:0]   x0_i,
  input  logic [W-1:0]   x1_i,
  input  logic [W-1:0]   y0_i,
  input  logic [W-1:0]   y1_i,
  input  logic           cin_i,
  input  logic [RND-1:0] rnd_i,
  output logic           valid_o,
  output logic [W-1:0]   s0_o,
  output logic [W-1:0]   s1_o,
  output logic           co0_o,
  output logic           co1_o
);

  // Offset of the random bits used by prefix level k (level 0 = generate).
  function automatic int unsigned rnd_off(int unsigned k);
    int unsigned off = W;
    for (int unsigned j = 1; j < k; j++) off += 2 * (W - (1 << (j - 1)));
    return (k == 0) ? 0 : off;
  endfunction

  // Per-level generate/propagate shares; index k is the value after level k.
  logic [LVL:0][W-1:0] g0, g1, p0, p1;
  // Original propagate bits, delayed to meet the final carries.
  logic [LAT-1:0][W-1:0] pd0_q, pd1_q;
  logic [LAT-1:0] cin_q, vld_q;

  // Level 0: generate through DOM AND, propagate registered to stay aligned.
  logic [W-1:0] gen0, gen1, pp0, pp1;
  dom_and #(.W(W)) u_gen (
    .clk_i, .a0_i(x0_i), .a1_i(x1_i), .b0_i(y0_i), .b1_i(y1_i),
    .r_i(rnd_i[W-1:0]), .q0_o(gen0), .q1_o(gen1)
  );

  always_ff @(posedge clk_i) begin
    pd0_q[0] <= x0_i ^ y0_i;
    pd1_q[0] <= x1_i ^ y1_i;
    cin_q[0] <= cin_i;
    for (int unsigned k = 1; k < LAT; k++) begin
      pd0_q[k] <= pd0_q[k-1];
      pd1_q[k] <= pd1_q[k-1];
      cin_q[k] <= cin_q[k-1];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) vld_q <= '0;
    else         vld_q <= {vld_q[LAT-2:0], valid_i};
  end

  assign pp0 = pd0_q[0];
  assign pp1 = pd1_q[0];

  // Fold the public carry-in into position 0: G0 = g0 ^ (p0 & cin).
  always_comb begin
    g0[0] = gen0;
    g1[0] = gen1;
    g0[0][0] = gen0[0] ^ (pp0[0] & cin_q[0]);
    g1[0][0] = gen1[0] ^ (pp1[0] & cin_q[0]);
    p0[0] = pp0;
    p1[0] = pp1;
  end

  // Prefix levels k = 1..LVL at distance d = 2**(k-1).
  for (genvar k = 1; k <= LVL; k++) begin : g_lvl
    localparam int unsigned D  = 1 << (k - 1);
    localparam int unsigned N  = W - D;
    localparam int unsigned RG = rnd_off(k);
    localparam int unsigned RP = RG + N;

    logic [N-1:0] and_g0, and_g1, and_p0, and_p1;
    logic [W-1:0] gd0_q, gd1_q, pl0_q, pl1_q;

    // P[i] & G[i-d]
    dom_and #(.W(N)) u_g (
      .clk_i,
      .a0_i(p0[k-1][W-1:D]), .a1_i(p1[k-1][W-1:D]),
      .b0_i(g0[k-1][N-1:0]), .b1_i(g1[k-1][N-1:0]),
      .r_i(rnd_i[RG +: N]), .q0_o(and_g0), .q1_o(and_g1)
    );
    // P[i] & P[i-d]
    dom_and #(.W(N)) u_p (
      .clk_i,
      .a0_i(p0[k-1][W-1:D]), .a1_i(p1[k-1][W-1:D]),
      .b0_i(p0[k-1][N-1:0]), .b1_i(p1[k-1][N-1:0]),
      .r_i(rnd_i[RP +: N]), .q0_o(and_p0), .q1_o(and_p1)
    );

    always_ff @(posedge clk_i) begin
      gd0_q <= g0[k-1];
      gd1_q <= g1[k-1];
      pl0_q <= p0[k-1];
      pl1_q <= p1[k-1];
    end

    assign g0[k] = {gd0_q[W-1:D] ^ and_g0, gd0_q[D-1:0]};
    assign g1[k] = {gd1_q[W-1:D] ^ and_g1, gd1_q[D-1:0]};
    assign p0[k] = {and_p0, pl0_q[D-1:0]};
    assign p1[k] = {and_p1, pl1_q[D-1:0]};
  end

  // Carry into bit i is the group generate of bits i-1..0 (with cin).
  assign s0_o    = pd0_q[LAT-1] ^ {g0[LVL][W-2:0], cin_q[LAT-1]};
  assign s1_o    = pd1_q[LAT-1] ^ {g1[LVL][W-2:0], 1'b0};
  assign co0_o   = g0[LVL][W-1];
  assign co1_o   = g1[LVL][W-1];
  assign valid_o = vld_q[LAT-1];

endmodule
