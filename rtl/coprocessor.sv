// coprocessor: secure neural network coprocessor attached to the core's PCPI.
//
// Holds the command decoder (cmd_decoder) and the secure neural network
// unit (snnu) and shares the memory with the core. While an mnn.*
// instruction is in progress the core is stalled on PCPI, so the
// coprocessor then owns the shared memory bus (active_o): port A carries
// the pixel writes of mnn.ifetch or the SNNU's pixel reads, port B the
// SNNU's weight and bias reads. Memory is word-addressed, reads return one
// cycle after the request.
//
// The result word seen by the core (rd of mnn.olayer) and by the host packs
// one share set: [W-1:0] score, [23:16] class, [31] set if the output layer
// ran masked; the second share set is on result1_o. Block partition per the
// document's SoC diagram; the packing is this design's choice.
module coprocessor
  import snn_pkg::*;
#(
  parameter int unsigned W         = DW,
  parameter int unsigned MAX_NODES = 512,
  parameter int unsigned AW        = 14,
  parameter int unsigned CW        = 8,
  parameter logic [63:0] SEED      = 64'h0123_4567_89AB_CDEF
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // PCPI
  input  logic          pcpi_valid_i,
  input  logic [31:0]   pcpi_insn_i,
  input  logic [31:0]   pcpi_rs1_i,
  input  logic [31:0]   pcpi_rs2_i,
  output logic          pcpi_wr_o,
  output logic [31:0]   pcpi_rd_o,
  output logic          pcpi_wait_o,
  output logic          pcpi_ready_o,
  // host pixel path
  output logic          pixel_req_o,
  output logic [31:0]   pixel_num_o,
  input  logic          px_we_i,
  input  logic [15:0]   px_cnt_i,
  input  logic [31:0]   px_data_i,
  input  logic          px_ack_i,
  // shared memory, port A (read/write) and port B (read)
  output logic          active_o,
  output logic          ma_en_o,
  output logic          ma_we_o,
  output logic [AW-1:0] ma_addr_o,
  output logic [31:0]   ma_wdata_o,
  input  logic [31:0]   ma_rdata_i,
  output logic          mb_en_o,
  output logic [AW-1:0] mb_addr_o,
  input  logic [31:0]   mb_rdata_i,
  // result
  output logic          result_valid_o,
  output logic [31:0]   result0_o,
  output logic [31:0]   result1_o
);

  logic          cfg_we, start, men, done, busy;
  cfg_idx_e      cfg_idx;
  logic [31:0]   cfg_ptr, cfg_size;
  layer_e        layer;
  logic          px_mem_we;
  logic [AW-1:0] px_mem_addr;
  logic [31:0]   px_mem_wdata;
  logic          pa_re, pb_re;
  logic [AW-1:0] pa_addr, pb_addr;
  logic          res_masked;
  logic [W-1:0]  sc0, sc1;
  logic [CW-1:0] cl0, cl1;
  cfg_t          cfg;

  assign result0_o = {res_masked, 7'b0, 8'(cl0), 16'(sc0)};
  assign result1_o = {res_masked, 7'b0, 8'(cl1), 16'(sc1)};

  cmd_decoder #(.AW(AW)) u_cmd (
    .clk_i, .rst_ni,
    .pcpi_valid_i, .pcpi_insn_i, .pcpi_rs1_i, .pcpi_rs2_i,
    .pcpi_wr_o, .pcpi_rd_o, .pcpi_wait_o, .pcpi_ready_o,
    .cfg_we_o(cfg_we), .cfg_idx_o(cfg_idx), .cfg_ptr_o(cfg_ptr),
    .cfg_size_o(cfg_size),
    .start_o(start), .layer_o(layer), .men_o(men), .done_i(done),
    .result_i(result0_o),
    .pixel_req_o, .pixel_num_o, .px_we_i, .px_cnt_i, .px_data_i, .px_ack_i,
    .px_mem_we_o(px_mem_we), .px_mem_addr_o(px_mem_addr),
    .px_mem_wdata_o(px_mem_wdata),
    .active_o
  );

  snnu #(.W(W), .MAX_NODES(MAX_NODES), .AW(AW), .CW(CW), .SEED(SEED)) u_snnu (
    .clk_i, .rst_ni,
    .cfg_we_i(cfg_we), .cfg_idx_i(cfg_idx), .cfg_ptr_i(cfg_ptr),
    .cfg_size_i(cfg_size),
    .start_i(start), .layer_i(layer), .men_i(men), .busy_o(busy), .done_o(done),
    .pa_re_o(pa_re), .pa_addr_o(pa_addr), .pa_rdata_i(ma_rdata_i),
    .pb_re_o(pb_re), .pb_addr_o(pb_addr), .pb_rdata_i(mb_rdata_i),
    .res_masked_o(res_masked), .res_score0_o(sc0), .res_score1_o(sc1),
    .res_cls0_o(cl0), .res_cls1_o(cl1),
    .cfg_o(cfg)
  );

  assign ma_en_o    = px_mem_we || pa_re;
  assign ma_we_o    = px_mem_we;
  assign ma_addr_o  = px_mem_we ? px_mem_addr : pa_addr;
  assign ma_wdata_o = px_mem_wdata;
  assign mb_en_o    = pb_re;
  assign mb_addr_o  = pb_addr;

  // Result valid from the end of an output layer until the next layer.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)    result_valid_o <= 1'b0;
    else if (start) result_valid_o <= 1'b0;
    else if (done && layer == LAYER_OUTPUT) result_valid_o <= 1'b1;
  end

  logic unused;
  assign unused = ^{cfg, busy};

endmodule
