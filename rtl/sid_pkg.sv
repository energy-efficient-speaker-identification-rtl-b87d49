// sid_pkg: types and constants shared by the speaker-ID accelerator.
//
// Data format: activations, biases, accumulators and the ternary layer scale
// are 32-bit two's-complement fixed point with 4 integer and 28 fraction bits
// (Q4.28), as in the document. Fixed-point weights are W_BITS-bit two's
// complement with W_BITS-1 fraction bits (range [-1, 1)); this scaling of the
// weights is this design's choice. Ternary weights use a 2-bit code.
//
// Memory: the on-chip store is 140 block RAMs of 512 x 72 bits, addressed as
// one 72-bit word space (17-bit word address). The document gives the block
// count and shape; the packing below is this design's own:
//   * 32-bit values (inputs, activations, biases): two per word, element 2k in
//     bits [31:0] and element 2k+1 in bits [63:32]; bits [71:64] unused.
//   * weights: 72/W_BITS per word, element j of a word in bits
//     [j*W_BITS +: W_BITS].
//   * model header at word 0, see hdr_t and layer_desc_t.
package sid_pkg;

  localparam int DATA_W    = 32;   // activation / accumulator width
  localparam int FRAC      = 28;   // fraction bits of Q4.28
  localparam int MEM_W     = 72;   // BRAM word width (simple dual port)
  localparam int BRAM_DEPTH = 512; // words per 36-Kbit block
  localparam int N_BRAM    = 140;  // blocks on the XC7Z020
  localparam int ADDR_W    = 17;   // word address over all blocks
  localparam int DIM_W     = 12;   // layer dimension field width

  localparam logic [DATA_W-1:0] ONE = DATA_W'(1) << FRAC;

  // Ternary weight codes.
  localparam logic [1:0] TW_ZERO = 2'b00;
  localparam logic [1:0] TW_POS  = 2'b01;
  localparam logic [1:0] TW_NEG  = 2'b11;

  // Header word 0.
  typedef struct packed {
    logic [MEM_W-42-1:0] rsvd;     // 30 bits
    logic [ADDR_W-1:0]   act_b;    // second activation buffer
    logic [ADDR_W-1:0]   act_a;    // input features / first activation buffer
    logic [7:0]          n_layers;
  } hdr_t;

  // Header words 1+2l (desc) and 2+2l (scale word, low 32 bits) per layer l.
  typedef struct packed {
    logic [MEM_W-65-1:0] rsvd;     // 7 bits
    logic [4:0]          qbits;    // fraction bits kept by the quantizer
    logic                quant;    // clip to [0,1] and truncate
    logic                relu;     // rectify
    logic [ADDR_W-1:0]   b_base;   // bias vector
    logic [ADDR_W-1:0]   w_base;   // weight block
    logic [DIM_W-1:0]    out_dim;
    logic [DIM_W-1:0]    in_dim;
  } layer_desc_t;

  typedef struct packed {
    layer_desc_t        d;
    logic [DATA_W-1:0]  scale;     // ternary layer constant Wp (Q4.28)
  } layer_cfg_t;

  // What a BRAM read issued by the controller carries back to the deserializer.
  typedef enum logic [1:0] {RD_X = 2'd0, RD_W = 2'd1, RD_B = 2'd2} rd_kind_e;

  typedef struct packed {
    rd_kind_e          kind;
    logic [DIM_W-1:0]  idx;        // word index inside the column / bias vector
    logic              last;       // last word of the column / bias vector
    logic              xhalf;      // RD_W: which half of the x word is x_i
  } rd_tag_t;

  // Controller states: the document's sleep / initialize / run machine.
  typedef enum logic [1:0] {S_SLEEP = 2'd0, S_INIT = 2'd1, S_RUN = 2'd2} ctrl_state_e;

  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
