// soc_top: side-channel protected neural network SoC.
//
// A RISC-V core runs the user's C program; custom-0 instructions on its
// PCPI go to the coprocessor, which computes binarized neural network
// layers masked or unmasked, layer by layer. Core and coprocessor share a
// dual-ported memory; the host loads firmware and pixels through a UART
// bridge and the host interface.
//
// Inside: host_if, mem_arbiter, dp_ram and coprocessor (cmd_decoder +
// snnu). The RISC-V core (PicoRV32) and the UART-to-bus bridge (uart2bus)
// are third-party blocks outside this top: the core's native memory and
// PCPI interfaces and the bridge's bus side are ports here, and
// core_resetn_o is the core's reset (low until the host's start command,
// and after a software reset).
//
// The host's software reset also resets the coprocessor (one cycle pulse,
// registered). Block partition per the document's SoC diagram.
//
// The masked datapath for higher-precision convolutional layers
// (masked_qconv_unit: pixel masking or B2A of shared activations,
// share-wise 8-bit MACs, masked ReLU, masked maxpool)
// is described by the document as an extension and is not attached to the
// instruction set; it sits beside the BNN path with its own qc_* ports.
module soc_top
  import snn_pkg::*;
#(
  parameter int unsigned W         = DW,
  parameter int unsigned MAX_NODES = 512,
  parameter int unsigned MEM_WORDS = 16384,
  parameter int unsigned CW        = 8,
  parameter logic [63:0] SEED      = 64'h0123_4567_89AB_CDEF
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // bus side of the UART bridge
  input  logic [15:0] host_addr_i,
  input  logic        host_wr_i,
  input  logic        host_rd_i,
  input  logic [7:0]  host_wdata_i,
  output logic [7:0]  host_rdata_o,
  // core reset
  output logic        core_resetn_o,
  // core native memory interface
  input  logic        mem_valid_i,
  input  logic [31:0] mem_addr_i,
  input  logic [31:0] mem_wdata_i,
  input  logic [3:0]  mem_wstrb_i,
  output logic        mem_ready_o,
  output logic [31:0] mem_rdata_o,
  // core PCPI
  input  logic        pcpi_valid_i,
  input  logic [31:0] pcpi_insn_i,
  input  logic [31:0] pcpi_rs1_i,
  input  logic [31:0] pcpi_rs2_i,
  output logic        pcpi_wr_o,
  output logic [31:0] pcpi_rd_o,
  output logic        pcpi_wait_o,
  output logic        pcpi_ready_o,
  // masked 8-bit convolution extension, side by side with the BNN path
  input  logic         qc_start_i,
  input  logic [W-1:0] qc_bias_i,
  input  logic         qc_valid_i,
  input  logic [7:0]   qc_pix_i,
  input  logic         qc_prev_i,
  input  logic [W-1:0] qc_act0_i,
  input  logic [W-1:0] qc_act1_i,
  input  logic [7:0]   qc_wgt_i,
  input  logic         qc_conv_end_i,
  input  logic         qc_pool_first_i,
  output logic         qc_ready_o,
  output logic         qc_pool_done_o,
  output logic [W-1:0] qc_max0_o,
  output logic [W-1:0] qc_max1_o
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  logic          soft_rst, core_run;
  logic          load_we;
  logic [AW-1:0] load_addr;
  logic [31:0]   load_data;
  logic          pixel_req, px_we, px_ack;
  logic [31:0]   pixel_num, px_data;
  logic [15:0]   px_cnt;
  logic          res_valid;
  logic [31:0]   res0, res1;

  host_if #(.AW(AW)) u_host (
    .clk_i, .rst_ni,
    .addr_i(host_addr_i), .wr_i(host_wr_i), .rd_i(host_rd_i),
    .wdata_i(host_wdata_i), .rdata_o(host_rdata_o),
    .soft_rst_o(soft_rst), .core_run_o(core_run),
    .load_we_o(load_we), .load_addr_o(load_addr), .load_data_o(load_data),
    .pixel_req_i(pixel_req), .pixel_num_i(pixel_num),
    .px_we_o(px_we), .px_cnt_o(px_cnt), .px_data_o(px_data), .px_ack_o(px_ack),
    .result_valid_i(res_valid), .result0_i(res0), .result1_i(res1)
  );

  // Coprocessor reset: power-on reset or the host's software reset.
  logic cp_rst_nq;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) cp_rst_nq <= 1'b0;
    else         cp_rst_nq <= !soft_rst;
  end

  assign core_resetn_o = rst_ni && core_run;

  logic          cp_active, cp_a_en, cp_a_we, cp_b_en;
  logic [AW-1:0] cp_a_addr, cp_b_addr;
  logic [31:0]   cp_a_wdata, cp_a_rdata, cp_b_rdata;

  coprocessor #(.W(W), .MAX_NODES(MAX_NODES), .AW(AW), .CW(CW), .SEED(SEED)) u_cp (
    .clk_i, .rst_ni(cp_rst_nq),
    .pcpi_valid_i, .pcpi_insn_i, .pcpi_rs1_i, .pcpi_rs2_i,
    .pcpi_wr_o, .pcpi_rd_o, .pcpi_wait_o, .pcpi_ready_o,
    .pixel_req_o(pixel_req), .pixel_num_o(pixel_num),
    .px_we_i(px_we), .px_cnt_i(px_cnt), .px_data_i(px_data), .px_ack_i(px_ack),
    .active_o(cp_active),
    .ma_en_o(cp_a_en), .ma_we_o(cp_a_we), .ma_addr_o(cp_a_addr),
    .ma_wdata_o(cp_a_wdata), .ma_rdata_i(cp_a_rdata),
    .mb_en_o(cp_b_en), .mb_addr_o(cp_b_addr), .mb_rdata_i(cp_b_rdata),
    .result_valid_o(res_valid), .result0_o(res0), .result1_o(res1)
  );

  logic          a_en, b_en;
  logic [3:0]    a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_wdata, a_rdata, b_wdata, b_rdata;

  mem_arbiter #(.AW(AW)) u_arb (
    .clk_i, .rst_ni,
    .core_valid_i(mem_valid_i), .core_addr_i(mem_addr_i),
    .core_wdata_i(mem_wdata_i), .core_wstrb_i(mem_wstrb_i),
    .core_ready_o(mem_ready_o), .core_rdata_o(mem_rdata_o),
    .cp_active_i(cp_active),
    .cp_a_en_i(cp_a_en), .cp_a_we_i(cp_a_we), .cp_a_addr_i(cp_a_addr),
    .cp_a_wdata_i(cp_a_wdata), .cp_a_rdata_o(cp_a_rdata),
    .cp_b_en_i(cp_b_en), .cp_b_addr_i(cp_b_addr), .cp_b_rdata_o(cp_b_rdata),
    .host_we_i(load_we), .host_addr_i(load_addr), .host_wdata_i(load_data),
    .a_en_o(a_en), .a_we_o(a_we), .a_addr_o(a_addr), .a_wdata_o(a_wdata),
    .a_rdata_i(a_rdata),
    .b_en_o(b_en), .b_we_o(b_we), .b_addr_o(b_addr), .b_wdata_o(b_wdata),
    .b_rdata_i(b_rdata)
  );

  dp_ram #(.DEPTH(MEM_WORDS)) u_mem (
    .clk_i,
    .a_en_i(a_en), .a_we_i(a_we), .a_addr_i(a_addr), .a_wdata_i(a_wdata),
    .a_rdata_o(a_rdata),
    .b_en_i(b_en), .b_we_i(b_we), .b_addr_i(b_addr), .b_wdata_i(b_wdata),
    .b_rdata_o(b_rdata)
  );

  masked_qconv_unit #(.W(W), .SEED(SEED ^ 64'h5A5A_5A5A_A5A5_A5A5)) u_qconv (
    .clk_i, .rst_ni,
    .start_i(qc_start_i), .bias_i(qc_bias_i), .valid_i(qc_valid_i),
    .pix_i(qc_pix_i), .prev_i(qc_prev_i), .act0_i(qc_act0_i), .act1_i(qc_act1_i),
    .wgt_i(qc_wgt_i), .conv_end_i(qc_conv_end_i),
    .pool_first_i(qc_pool_first_i), .ready_o(qc_ready_o),
    .pool_done_o(qc_pool_done_o), .max0_o(qc_max0_o), .max1_o(qc_max1_o)
  );

endmodule
