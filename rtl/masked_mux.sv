// masked_mux: first-order masked 2:1 multiplexer.
//
// Selects o = sel ? a : b where sel, a and b are all Boolean-shared. It is
// computed as o = b ^ (sel & (a ^ b)) with one DOM AND per bit; the shared
// select bit is broadcast to all W positions and b is delayed one cycle to
// meet the gadget output. The document builds its masked multiplexer from
// DOM AND gates; this formulation is the usual one.
//
// Timing: one cycle of latency, a new selection every cycle; r_i needs W
// fresh random bits per cycle.
module masked_mux #(
  parameter int unsigned W = 16
) (
  input  logic         clk_i,
  input  logic         sel0_i,
  input  logic         sel1_i,
  input  logic [W-1:0] a0_i,
  input  logic [W-1:0] a1_i,
  input  logic [W-1:0] b0_i,
  input  logic [W-1:0] b1_i,
  input  logic [W-1:0] r_i,
  output logic [W-1:0] o0_o,
  output logic [W-1:0] o1_o
);

  logic [W-1:0] and0, and1, bd0_q, bd1_q;

  dom_and #(.W(W)) u_and (
    .clk_i,
    .a0_i({W{sel0_i}}), .a1_i({W{sel1_i}}),
    .b0_i(a0_i ^ b0_i), .b1_i(a1_i ^ b1_i),
    .r_i, .q0_o(and0), .q1_o(and1)
  );

  always_ff @(posedge clk_i) begin
    bd0_q <= b0_i;
    bd1_q <= b1_i;
  end

  assign o0_o = bd0_q ^ and0;
  assign o1_o = bd1_q ^ and1;

endmodule
