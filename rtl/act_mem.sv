// act_mem: local activation memory of the SNNU.
//
// Each location holds two activations, each as two Boolean shares:
// bits [1:0] = shares (s1, s0) of the even activation, bits [3:2] = shares of
// the odd activation. In unmasked mode the second share is stored as 0, so
// the same layout carries clear values. A write updates one half of a
// location (we_i[0] even half, we_i[1] odd half); the read is synchronous
// with one cycle of latency. Two instances form the ping-pong pair the
// layer-sequential SNNU needs. Packing per the document's hidden-layer
// figure; the depth is set by the largest layer the design accepts.
module act_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk_i,
  input  logic [1:0]    we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [3:0]    wdata_i,
  input  logic [AW-1:0] raddr_i,
  output logic [3:0]    rdata_o
);

  logic [3:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i[0]) mem[waddr_i][1:0] <= wdata_i[1:0];
    if (we_i[1]) mem[waddr_i][3:2] <= wdata_i[3:2];
    rdata_o <= mem[raddr_i];
  end

endmodule
