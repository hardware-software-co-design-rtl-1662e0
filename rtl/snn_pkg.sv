// snn_pkg: types and constants shared by the secure BNN coprocessor.
//
// The datapath works modulo K = 2**DW. A value is either held in clear or as
// two shares: arithmetic shares (s0 + s1 mod K) for weighted sums, Boolean
// shares (s0 ^ s1) for non-linear functions. The custom instructions live in
// the RISC-V custom-0 major opcode (bits [6:2] = 00010, bits [1:0] = 11) and
// are told apart by the minor opcode, funct3. The funct3 numbering, the use of
// funct7 as configuration-register index and the register map are this
// design's own choices.
package snn_pkg;

  // Modulus exponent of the modular arithmetic (K = 2**DW).
  localparam int unsigned DW = 16;

  // custom-0 major opcode, full 7-bit field.
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;

  // Minor opcodes (funct3) of the five mnn.* instructions.
  typedef enum logic [2:0] {
    F3_CFGWR  = 3'd0,
    F3_IFETCH = 3'd1,
    F3_ILAYER = 3'd2,
    F3_HLAYER = 3'd3,
    F3_OLAYER = 3'd4
  } mnn_funct3_e;

  // Configuration register index of mnn.cfgwr (taken from funct7).
  typedef enum logic [1:0] {
    CFG_IMAGE  = 2'd0,  // pointer to pixels, number of pixel words
    CFG_WEIGHT = 2'd1,  // pointer to weights, number of weights
    CFG_BIAS   = 2'd2,  // pointer to biases, number of biases
    CFG_DIMS   = 2'd3   // nodes into the layer, nodes out of the layer
  } cfg_idx_e;

  // Which layer the SNNU is asked to compute.
  typedef enum logic [1:0] {
    LAYER_INPUT  = 2'd0,
    LAYER_HIDDEN = 2'd1,
    LAYER_OUTPUT = 2'd2
  } layer_e;

  // One configuration register: pointer and size, as written by mnn.cfgwr.
  typedef struct packed {
    logic [31:0] ptr;
    logic [31:0] size;
  } cfg_reg_t;

  // All configuration registers of the coprocessor.
  typedef struct packed {
    cfg_reg_t image;
    cfg_reg_t weight;
    cfg_reg_t bias;
    cfg_reg_t dims;
  } cfg_t;

  // Number of fresh random bits one DOM-AND based Kogge-Stone adder of
  // width w consumes per cycle: w generate ANDs, then per prefix level of
  // distance d, (w-d) ANDs for G and (w-d) for P.
  function automatic int unsigned ks_rnd_bits(int unsigned w);
    int unsigned n = w;
    for (int unsigned d = 1; d < w; d = d * 2) n += 2 * (w - d);
    return n;
  endfunction

  // Number of prefix levels of a Kogge-Stone tree of width w.
  function automatic int unsigned ks_levels(int unsigned w);
    int unsigned l = 0;
    for (int unsigned d = 1; d < w; d = d * 2) l++;
    return l;
  endfunction

endpackage
