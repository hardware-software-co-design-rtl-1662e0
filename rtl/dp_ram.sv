// dp_ram: dual-ported shared memory of the SoC.
//
// Two independent synchronous ports, each with enable, byte write strobes,
// word address and 32-bit data; a read returns the word one cycle after the
// enable (read-first when a port writes the word it reads). It holds the
// firmware, the network parameters and the input pixels. Contents are
// undefined after power-up; the host loads them. The document calls for a
// dual-ported memory shared by core and coprocessor; its size is this
// design's choice (64 KiB).
module dp_ram #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk_i,
  input  logic          a_en_i,
  input  logic [3:0]    a_we_i,
  input  logic [AW-1:0] a_addr_i,
  input  logic [31:0]   a_wdata_i,
  output logic [31:0]   a_rdata_o,
  input  logic          b_en_i,
  input  logic [3:0]    b_we_i,
  input  logic [AW-1:0] b_addr_i,
  input  logic [31:0]   b_wdata_i,
  output logic [31:0]   b_rdata_o
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (a_en_i) begin
      a_rdata_o <= mem[a_addr_i];
      for (int i = 0; i < 4; i++)
        if (a_we_i[i]) mem[a_addr_i][8*i +: 8] <= a_wdata_i[8*i +: 8];
    end
    if (b_en_i) begin
      b_rdata_o <= mem[b_addr_i];
      for (int i = 0; i < 4; i++)
        if (b_we_i[i]) mem[b_addr_i][8*i +: 8] <= b_wdata_i[8*i +: 8];
    end
  end

endmodule
