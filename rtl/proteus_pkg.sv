// proteus_pkg: types and constants shared by the Proteus translation layer
// and the accelerator node built around it.
//
// Every value is computed in a 16-bit native fixed-point format, while in
// the buffers and the central eDRAM it is stored with a per-layer precision
// of P bits (1..16). A stored value's least significant bit lines up with
// bit LSB of the native word (the layer's fixed exponent), so the stored
// bits are native bits [LSB+P-1:LSB]. The native word width (16), the
// 16-word NBin/NBout rows and the 256-word SB rows follow the document. The
// number of native fractional bits, the command set and the encodings below
// are this design's own choices.
package proteus_pkg;

  localparam int unsigned NATIVE_W  = 16;  // native fixed-point width
  localparam int unsigned NATIVE_FRAC = 8; // fractional bits of the native format
  localparam int unsigned REG_W     = 2 * NATIVE_W; // unpacking/packing register
  localparam int unsigned ROT_W     = $clog2(REG_W);
  localparam int unsigned PREC_W    = 5;   // holds P = 1..16
  localparam int unsigned POS_W     = 4;   // holds an LSB position 0..15
  localparam int unsigned CNT_W     = 16;  // value / row counters

  typedef logic [NATIVE_W-1:0] word_t;
  typedef logic [REG_W-1:0]    reg_t;

  // Storage representation of one stream: P bits, fixed exponent given as the
  // native bit position of the stored LSB, and the stream length in values
  // after which the next value starts on a fresh row (alignment).
  typedef struct packed {
    logic [PREC_W-1:0] p;
    logic [POS_W-1:0]  lsb;
    logic [CNT_W-1:0]  stream_len;
  } repr_t;

  // Per-layer configuration: input data, weights and output data.
  typedef struct packed {
    repr_t data_in;
    repr_t weight;
    repr_t data_out;
  } layer_cfg_t;

  // Commands of the node sequencer.
  typedef enum logic [1:0] {
    OP_LOAD_NBIN = 2'd0,  // broadcast central-eDRAM rows into every NBin
    OP_COMPUTE   = 2'd1,  // every NFU runs one inner-product pass
    OP_STORE     = 2'd2   // every NFU packs NBout entries back to the eDRAM
  } op_e;

  typedef struct packed {
    op_e         op;
    logic [16:0] edram_addr;   // LOAD: source row; STORE: destination row of NFU 0
    logic [16:0] edram_stride; // STORE: rows between the regions of two NFUs
    logic [CNT_W-1:0] count;   // LOAD: rows; COMPUTE/STORE: values
    logic [5:0]  nbin_addr;    // LOAD: first NBin row; COMPUTE: first input row
    logic [11:0] sb_addr;      // COMPUTE: first SB row
    logic [5:0]  nbout_addr;   // COMPUTE: accumulator entry; STORE: first entry
    logic        accumulate;   // COMPUTE: start from the NBout entry, not zero
  } cmd_t;

  // Extension masks for a P-bit value whose LSB sits at native bit lsb.
  function automatic word_t keep_mask(input logic [PREC_W-1:0] p, input logic [POS_W-1:0] lsb);
    logic [NATIVE_W:0] m;
    m = ((17'd1 << p) - 17'd1) << lsb;
    return m[NATIVE_W-1:0];
  endfunction

  function automatic word_t msb_mask(input logic [PREC_W-1:0] p, input logic [POS_W-1:0] lsb);
    logic [NATIVE_W:0] m;
    m = 17'd1 << (5'(lsb) + p - 5'd1);
    return m[NATIVE_W-1:0];
  endfunction

  // Bits above the value's MSB, filled with its sign on unpacking.
  function automatic word_t above_mask(input logic [PREC_W-1:0] p, input logic [POS_W-1:0] lsb);
    logic [NATIVE_W:0] m;
    m = ~((17'd1 << (6'(lsb) + 6'(p))) - 17'd1);
    return m[NATIVE_W-1:0];
  endfunction

endpackage
