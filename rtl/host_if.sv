// host_if: host interface between the UART-to-bus bridge and the SoC.
//
// The bridge turns host UART traffic into byte-wide reads and writes on a
// 16-bit address bus. This block maps those addresses to the commands of
// the start-up sequence: software reset, romload (memory writes), start,
// pixel load, acknowledge and result read-out.
//
// Register map (byte addresses, multi-byte fields little-endian):
//   0x00 W  CTRL      bit0 software reset, bit1 start core, bit2 pixel ack
//   0x00 R  STATUS    bit0 pixel_req, bit1 result valid, bit2 core running
//   0x04-05 LOAD_ADDR word address of the next romload write
//   0x08-0B LOAD_DATA writing byte 0x0B writes the word and increments
//                     LOAD_ADDR
//   0x0C-0D PIX_CNT   count of the next pixel word
//   0x10-13 PIX_DATA  writing byte 0x13 sends (PIX_CNT, word) to the
//                     coprocessor and increments PIX_CNT
//   0x14-17 R PIX_NUM number of pixel words the core asked for
//   0x20-23 R RESULT0 result word, share 0
//   0x24-27 R RESULT1 result word, share 1
// Reads return data one cycle after rd_i. Software reset pulses soft_rst_o
// for one cycle and stops the core; start releases the core's reset.
// The commands follow the document's start-up sequence; the register map
// and the byte-wide bus are this design's choices.
module host_if #(
  parameter int unsigned AW = 14
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // bus from the UART bridge
  input  logic [15:0]   addr_i,
  input  logic          wr_i,
  input  logic          rd_i,
  input  logic [7:0]    wdata_i,
  output logic [7:0]    rdata_o,
  // control
  output logic          soft_rst_o,
  output logic          core_run_o,
  // romload
  output logic          load_we_o,
  output logic [AW-1:0] load_addr_o,
  output logic [31:0]   load_data_o,
  // pixels
  input  logic          pixel_req_i,
  input  logic [31:0]   pixel_num_i,
  output logic          px_we_o,
  output logic [15:0]   px_cnt_o,
  output logic [31:0]   px_data_o,
  output logic          px_ack_o,
  // result
  input  logic          result_valid_i,
  input  logic [31:0]   result0_i,
  input  logic [31:0]   result1_i
);

  logic [15:0] load_addr_q;
  logic [23:0] load_lo_q;
  logic [23:0] px_lo_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      soft_rst_o  <= 1'b0;
      core_run_o  <= 1'b0;
      px_ack_o    <= 1'b0;
      load_we_o   <= 1'b0;
      px_we_o     <= 1'b0;
      load_addr_q <= '0;
      load_lo_q   <= '0;
      load_data_o <= '0;
      px_cnt_o    <= '0;
      px_lo_q     <= '0;
      px_data_o   <= '0;
      rdata_o     <= '0;
    end else begin
      soft_rst_o <= 1'b0;
      px_ack_o   <= 1'b0;
      load_we_o  <= 1'b0;
      px_we_o    <= 1'b0;
      // A write strobe advances the counter after its data went out.
      if (load_we_o) load_addr_q <= load_addr_q + 1'b1;
      if (px_we_o)   px_cnt_o    <= px_cnt_o + 1'b1;
      if (wr_i) begin
        unique case (addr_i)
          16'h00: begin
            if (wdata_i[0]) begin
              soft_rst_o <= 1'b1;
              core_run_o <= 1'b0;
            end
            if (wdata_i[1]) core_run_o <= 1'b1;
            if (wdata_i[2]) px_ack_o   <= 1'b1;
          end
          16'h04: load_addr_q[7:0]  <= wdata_i;
          16'h05: load_addr_q[15:8] <= wdata_i;
          16'h08: load_lo_q[7:0]    <= wdata_i;
          16'h09: load_lo_q[15:8]   <= wdata_i;
          16'h0A: load_lo_q[23:16]  <= wdata_i;
          16'h0B: begin
            load_data_o <= {wdata_i, load_lo_q};
            load_we_o   <= 1'b1;
          end
          16'h0C: px_cnt_o[7:0]  <= wdata_i;
          16'h0D: px_cnt_o[15:8] <= wdata_i;
          16'h10: px_lo_q[7:0]   <= wdata_i;
          16'h11: px_lo_q[15:8]  <= wdata_i;
          16'h12: px_lo_q[23:16] <= wdata_i;
          16'h13: begin
            px_data_o <= {wdata_i, px_lo_q};
            px_we_o   <= 1'b1;
          end
          default: ;
        endcase
      end
      if (rd_i) begin
        unique case (addr_i)
          16'h00: rdata_o <= {5'b0, core_run_o, result_valid_i, pixel_req_i};
          16'h14: rdata_o <= pixel_num_i[7:0];
          16'h15: rdata_o <= pixel_num_i[15:8];
          16'h16: rdata_o <= pixel_num_i[23:16];
          16'h17: rdata_o <= pixel_num_i[31:24];
          16'h20: rdata_o <= result0_i[7:0];
          16'h21: rdata_o <= result0_i[15:8];
          16'h22: rdata_o <= result0_i[23:16];
          16'h23: rdata_o <= result0_i[31:24];
          16'h24: rdata_o <= result1_i[7:0];
          16'h25: rdata_o <= result1_i[15:8];
          16'h26: rdata_o <= result1_i[23:16];
          16'h27: rdata_o <= result1_i[31:24];
          default: rdata_o <= '0;
        endcase
      end
    end
  end

  assign load_addr_o = load_addr_q[AW-1:0];

  if (AW < 16) begin : g_unused
    logic unused;
    assign unused = ^load_addr_q[15:AW];
  end

endmodule
