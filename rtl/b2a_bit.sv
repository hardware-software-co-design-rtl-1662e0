// b2a_bit: Boolean-to-arithmetic conversion of one shared bit.
//
// Input: Boolean shares of a bit, x = b0 ^ b1. Output: arithmetic shares
// mod 2**W, x = a0 + a1. A fresh random bit rb and a fresh random word R1
// form a random bit with both sharings: R0 = rb - R1, so R0 + R1 = rb.
// Stage 1 registers b0 ^ rb and b1 in separate flip-flops and XORs them,
// giving z = x ^ rb, which is uniformly random and safe to handle. Stage 2
// unmasks with arithmetic shares of rb:
//   x = z ^ rb = z + (1 - 2z) rb  ->  a0 = z + (1-2z) R0,  a1 = (1-2z) R1.
// The document names a Boolean-to-arithmetic unit for the hidden-layer
// XNOR results but does not give its insides; this construction is this
// design's own.
//
// Timing: pipelined, one bit per cycle, latency 2 from valid_i to valid_o.
// rnd_i = {R1, rb} must be fresh every cycle.
module b2a_bit
  import snn_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         valid_i,
  input  logic         b0_i,
  input  logic         b1_i,
  input  logic [W:0]   rnd_i,
  output logic         valid_o,
  output logic [W-1:0] a0_o,
  output logic [W-1:0] a1_o
);

  logic         rb;
  logic [W-1:0] r1;
  assign rb = rnd_i[0];
  assign r1 = rnd_i[W:1];

  logic         zb0_q, zb1_q, v1_q;
  logic [W-1:0] r0_q, r1_q;
  logic         z;

  always_ff @(posedge clk_i) begin
    zb0_q <= b0_i ^ rb;
    zb1_q <= b1_i;
    r0_q  <= W'(rb) - r1;
    r1_q  <= r1;
  end

  assign z = zb0_q ^ zb1_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      v1_q    <= 1'b0;
      valid_o <= 1'b0;
      a0_o    <= '0;
      a1_o    <= '0;
    end else begin
      v1_q    <= valid_i;
      valid_o <= v1_q;
      a0_o    <= z ? (W'(1) - r0_q) : r0_q;
      a1_o    <= z ? (W'(0) - r1_q) : r1_q;
    end
  end

endmodule
