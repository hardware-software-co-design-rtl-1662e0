// mac_unit: modular multiply-accumulate for one datapath (one share).
//
// acc <= clr ? init : acc + (neg ? -x : x), all mod 2**W. Binary weights
// make the multiplication a conditional two's-complement negation
// (weight 1 = +1, weight 0 = -1). The SNNU has two of these: in masked mode
// each works on one arithmetic share, in unmasked mode they accumulate the
// even and odd partial products of the same neuron in parallel. Operands
// are applied when en_i is high; the accumulator changes one cycle later.
// The two-MAC structure follows the document; the init port (used to
// preload the bias) is this design's choice.
module mac_unit
  import snn_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         clr_i,
  input  logic [W-1:0] init_i,
  input  logic         en_i,
  input  logic [W-1:0] x_i,
  input  logic         neg_i,
  output logic [W-1:0] acc_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)    acc_o <= '0;
    else if (clr_i) acc_o <= init_i;
    else if (en_i)  acc_o <= acc_o + (neg_i ? (W'(0) - x_i) : x_i);
  end

endmodule
