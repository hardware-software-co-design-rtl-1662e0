// cmd_decoder: command decoder (CMD) between the RISC-V core and the SNNU.
//
// Watches the core's PCPI (pico co-processor interface, valid/ready) for
// custom-0 instructions (insn[6:0] = 0001011) and breaks each into
// commands for the secure neural network unit:
//   funct3 0  mnn.cfgwr  rs1, rs2 : write pointer rs1 and size rs2 to the
//                                   configuration register funct7[1:0]
//   funct3 1  mnn.ifetch rs1, rs2 : raise pixel_req; every pixel word the
//                                   host sends with count c is written to
//                                   word rs1/4 + c; the host's ack ends it
//   funct3 2  mnn.ilayer rs1      : masking bit rs1[0], start input layer
//   funct3 3  mnn.hlayer rs1      : same for a hidden layer
//   funct3 4  mnn.olayer rs1      : same for the output layer; returns the
//                                   share-0 result word in rd
// Other instructions are ignored so that the core's own trap handling sees
// them. pcpi_wait is held while an instruction is being worked on and
// pcpi_ready pulses for one cycle when it completes.
// The opcode space and the five instructions with their operands follow
// the document; the funct3 values, the use of funct7 and the handshake
// details are this design's choices.
module cmd_decoder
  import snn_pkg::*;
#(
  parameter int unsigned AW = 14
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
  // configuration register writes
  output logic          cfg_we_o,
  output cfg_idx_e      cfg_idx_o,
  output logic [31:0]   cfg_ptr_o,
  output logic [31:0]   cfg_size_o,
  // layer trigger
  output logic          start_o,
  output layer_e        layer_o,
  output logic          men_o,
  input  logic          done_i,
  input  logic [31:0]   result_i,
  // pixel fetch from the host
  output logic          pixel_req_o,
  output logic [31:0]   pixel_num_o,
  input  logic          px_we_i,
  input  logic [15:0]   px_cnt_i,
  input  logic [31:0]   px_data_i,
  input  logic          px_ack_i,
  output logic          px_mem_we_o,
  output logic [AW-1:0] px_mem_addr_o,
  output logic [31:0]   px_mem_wdata_o,
  // coprocessor owns the shared memory bus
  output logic          active_o
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_LAYER, S_RESP} state_e;
  state_e state_q;

  logic [2:0]    funct3;
  logic          is_mnn;
  assign funct3 = pcpi_insn_i[14:12];
  assign is_mnn = pcpi_valid_i && (pcpi_insn_i[6:0] == OPC_CUSTOM0)
                  && (funct3 <= F3_OLAYER);

  logic [AW-1:0] px_base_q;
  logic          wr_q;
  logic [31:0]   rd_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      px_base_q   <= '0;
      pixel_num_o <= '0;
      wr_q        <= 1'b0;
      rd_q        <= '0;
      layer_o     <= LAYER_INPUT;
      men_o       <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (is_mnn) begin
          wr_q <= 1'b0;
          rd_q <= '0;
          unique case (mnn_funct3_e'(funct3))
            F3_CFGWR:  state_q <= S_RESP;
            F3_IFETCH: begin
              px_base_q   <= pcpi_rs1_i[AW+1:2];
              pixel_num_o <= pcpi_rs2_i;
              state_q     <= S_FETCH;
            end
            F3_ILAYER, F3_HLAYER, F3_OLAYER: begin
              layer_o <= (funct3 == F3_ILAYER) ? LAYER_INPUT :
                         (funct3 == F3_HLAYER) ? LAYER_HIDDEN : LAYER_OUTPUT;
              men_o   <= pcpi_rs1_i[0];
              state_q <= S_LAYER;
            end
            default: state_q <= S_IDLE;
          endcase
        end
        S_FETCH: if (px_ack_i) state_q <= S_RESP;
        S_LAYER: if (done_i) begin
          wr_q    <= (layer_o == LAYER_OUTPUT);
          rd_q    <= result_i;
          state_q <= S_RESP;
        end
        S_RESP:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Configuration writes happen in the cycle the instruction is seen.
  assign cfg_we_o   = (state_q == S_IDLE) && is_mnn && (funct3 == F3_CFGWR);
  assign cfg_idx_o  = cfg_idx_e'(pcpi_insn_i[26:25]);
  assign cfg_ptr_o  = pcpi_rs1_i;
  assign cfg_size_o = pcpi_rs2_i;

  // Trigger pulse one cycle after decode, when layer_o and men_o are set.
  logic start_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) start_q <= 1'b0;
    else         start_q <= (state_q == S_IDLE) && is_mnn
                            && (funct3 >= F3_ILAYER);
  end
  assign start_o = start_q;

  assign pixel_req_o    = (state_q == S_FETCH);
  assign px_mem_we_o    = (state_q == S_FETCH) && px_we_i;
  assign px_mem_addr_o  = px_base_q + AW'(px_cnt_i);
  assign px_mem_wdata_o = px_data_i;

  assign pcpi_ready_o = (state_q == S_RESP);
  assign pcpi_wr_o    = (state_q == S_RESP) && wr_q;
  assign pcpi_rd_o    = rd_q;
  assign pcpi_wait_o  = (state_q != S_IDLE) || is_mnn;
  assign active_o     = (state_q != S_IDLE);

  // The core holds a PCPI request until it is answered.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   (state_q != S_IDLE && state_q != S_RESP) |-> pcpi_valid_i);

endmodule
