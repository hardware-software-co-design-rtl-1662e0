// dom_and: first-order domain-oriented masking (DOM) AND gadget, bit-sliced.
//
// Computes Boolean shares of q = a & b from shares a = a0 ^ a1 and
// b = b0 ^ b1, for W independent bits at once. Each domain keeps its own
// inner product (a0&b0, a1&b1); the two cross-domain products are refreshed
// with one fresh random bit r per bit position before they are registered,
// then compressed into the owning domain:
//   q0 = [a0&b0] ^ [a0&b1 ^ r],   q1 = [a1&b1] ^ [a1&b0 ^ r]
// where [.] is a flip-flop. All four partial products are registered, so the
// gadget has exactly one cycle of latency and the outputs change only on the
// clock edge after the inputs. The inner-domain registers are this design's
// choice for alignment; the structure follows the classic DOM AND gate.
// There is no enable: the gadget computes every cycle.
module dom_and #(
  parameter int unsigned W = 1
) (
  input  logic         clk_i,
  input  logic [W-1:0] a0_i,
  input  logic [W-1:0] a1_i,
  input  logic [W-1:0] b0_i,
  input  logic [W-1:0] b1_i,
  input  logic [W-1:0] r_i,
  output logic [W-1:0] q0_o,
  output logic [W-1:0] q1_o
);

  logic [W-1:0] inner0_q, inner1_q, cross0_q, cross1_q;

  always_ff @(posedge clk_i) begin
    inner0_q <= a0_i & b0_i;
    inner1_q <= a1_i & b1_i;
    cross0_q <= (a0_i & b1_i) ^ r_i;
    cross1_q <= (a1_i & b0_i) ^ r_i;
  end

  assign q0_o = inner0_q ^ cross0_q;
  assign q1_o = inner1_q ^ cross1_q;

endmodule
