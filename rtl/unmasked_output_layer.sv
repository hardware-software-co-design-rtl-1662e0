// unmasked_output_layer: maximum search for the output layer in clear.
//
// Holds one register pair (best score, best class) and one comparator. Each
// score that arrives with valid_i is compared with the stored maximum and
// replaces it if greater; first_i marks the first score of an inference and
// loads it unconditionally. Its index counts from 0 at first_i.
// Because sums are taken mod K = 2**W, the document searches first for the
// largest score below K/2 and only if there is none for the global maximum.
// Ordering scores by the key (score ^ K/2) gives that result in one pass:
// every score below K/2 ranks above every score at or above it, and inside
// each group larger values rank higher. Ties keep the earlier class.
//
// Timing: one score per cycle, result registered one cycle after valid_i.
module unmasked_output_layer
  import snn_pkg::*;
#(
  parameter int unsigned W  = DW,
  parameter int unsigned CW = 8
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          valid_i,
  input  logic          first_i,
  input  logic [W-1:0]  score_i,
  output logic [W-1:0]  max_score_o,
  output logic [CW-1:0] class_o
);

  localparam logic [W-1:0] HALF = W'(1) << (W - 1);

  logic [W-1:0]  key_q;
  logic [CW-1:0] idx_q, idx;
  logic [W-1:0]  key;

  assign key = score_i ^ HALF;
  assign idx = first_i ? '0 : idx_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      key_q   <= '0;
      idx_q   <= '0;
      class_o <= '0;
    end else if (valid_i) begin
      idx_q <= idx + 1'b1;
      if (first_i || key > key_q) begin
        key_q   <= key;
        class_o <= idx;
      end
    end
  end

  assign max_score_o = key_q ^ HALF;

endmodule
