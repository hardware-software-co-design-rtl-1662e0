// mem_arbiter: shared memory bus between core, coprocessor and host loader.
//
// Port A of the dual-ported memory is the shared memory bus of core and
// coprocessor: the coprocessor takes it whenever it is active (the core is
// then stalled on its PCPI instruction), otherwise the core's native memory
// interface (valid/ready, byte address, write strobes) uses it. A core
// access is issued in the cycle it is granted; mem_ready and the read data
// follow one cycle later. Port B carries the host's romload writes, which
// take priority, and otherwise the coprocessor's weight and bias reads.
// The shared bus and the dual-ported memory follow the document; the
// priority order and port assignment are this design's choices.
module mem_arbiter #(
  parameter int unsigned AW = 14
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // core (PicoRV32 native memory interface)
  input  logic          core_valid_i,
  input  logic [31:0]   core_addr_i,
  input  logic [31:0]   core_wdata_i,
  input  logic [3:0]    core_wstrb_i,
  output logic          core_ready_o,
  output logic [31:0]   core_rdata_o,
  // coprocessor
  input  logic          cp_active_i,
  input  logic          cp_a_en_i,
  input  logic          cp_a_we_i,
  input  logic [AW-1:0] cp_a_addr_i,
  input  logic [31:0]   cp_a_wdata_i,
  output logic [31:0]   cp_a_rdata_o,
  input  logic          cp_b_en_i,
  input  logic [AW-1:0] cp_b_addr_i,
  output logic [31:0]   cp_b_rdata_o,
  // host loader
  input  logic          host_we_i,
  input  logic [AW-1:0] host_addr_i,
  input  logic [31:0]   host_wdata_i,
  // memory
  output logic          a_en_o,
  output logic [3:0]    a_we_o,
  output logic [AW-1:0] a_addr_o,
  output logic [31:0]   a_wdata_o,
  input  logic [31:0]   a_rdata_i,
  output logic          b_en_o,
  output logic [3:0]    b_we_o,
  output logic [AW-1:0] b_addr_o,
  output logic [31:0]   b_wdata_o,
  input  logic [31:0]   b_rdata_i
);

  logic pend_q, core_go;
  assign core_go = core_valid_i && !cp_active_i && !pend_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) pend_q <= 1'b0;
    else         pend_q <= core_go;
  end

  always_comb begin
    if (cp_active_i) begin
      a_en_o    = cp_a_en_i;
      a_we_o    = {4{cp_a_we_i}};
      a_addr_o  = cp_a_addr_i;
      a_wdata_o = cp_a_wdata_i;
    end else begin
      a_en_o    = core_go;
      a_we_o    = core_wstrb_i;
      a_addr_o  = core_addr_i[AW+1:2];
      a_wdata_o = core_wdata_i;
    end
    if (host_we_i) begin
      b_en_o    = 1'b1;
      b_we_o    = 4'hF;
      b_addr_o  = host_addr_i;
      b_wdata_o = host_wdata_i;
    end else begin
      b_en_o    = cp_b_en_i;
      b_we_o    = 4'h0;
      b_addr_o  = cp_b_addr_i;
      b_wdata_o = '0;
    end
  end

  assign core_ready_o = pend_q;
  assign core_rdata_o = a_rdata_i;
  assign cp_a_rdata_o = a_rdata_i;
  assign cp_b_rdata_o = b_rdata_i;

  logic unused;
  assign unused = ^{core_addr_i[31:AW+2], core_addr_i[1:0]};

endmodule
