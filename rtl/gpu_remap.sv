// gpu_remap: the Proteus translation layer as applied to a GPU, where it is
// an address remapping in front of the L1 cache rather than a per-buffer
// unpacker.
//
// An array of reduced-precision values is stored in global memory packed
// into cache lines. A value never crosses a line boundary: each line holds
// floor(LINE_BITS / P_eff) value slots of P_eff bits and the rest of the
// line is padding, so no shifting or joining across lines is needed. Because
// coalesced accesses limit the gain, precisions are grouped and each group
// takes the slot width of its largest member: P = 11..16 use 16-bit slots,
// P = 9..10 use 10-bit slots, P = 7..8 use 8-bit slots. Smaller precisions
// use their own width here (the grouping below 7 bits is this design's
// choice). A value of P bits sits at the bottom of its slot.
//
// For element index_i of an array at byte address base_i (line aligned) the
// block returns the line address and the bit offset inside the line. Given
// that line (line_i), it extracts the element as a native 16-bit
// fixed-point value (read path), and it produces the write data and bit
// mask that store wvalue_i, rounded to nearest and saturated to P bits, in
// the element's slot (write path). Entirely combinational.
module gpu_remap
  import proteus_pkg::*;
#(
  parameter int unsigned LINE_BITS = 1024,  // 128-byte cache line
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned IDX_W     = 24,
  localparam int unsigned OFF_W    = $clog2(LINE_BITS)
) (
  input  logic [ADDR_W-1:0]    base_i,      // array base, line aligned
  input  logic [IDX_W-1:0]     index_i,     // element index
  input  logic [PREC_W-1:0]    p_i,         // storage precision, 1..16
  input  logic [POS_W-1:0]     lsb_i,       // native bit of the stored LSB
  output logic [PREC_W-1:0]    p_eff_o,     // slot width
  output logic [ADDR_W-1:0]    line_addr_o, // byte address of the line
  output logic [OFF_W-1:0]     bit_off_o,   // first bit of the slot
  input  logic [LINE_BITS-1:0] line_i,      // line contents (read path)
  output word_t                rvalue_o,    // element as a native value
  input  word_t                wvalue_i,    // native value to store
  output logic [LINE_BITS-1:0] wdata_o,     // line write data (write path)
  output logic [LINE_BITS-1:0] wmask_o      // line bits to write
);

  localparam int unsigned LINE_BYTES = LINE_BITS / 8;

  logic [IDX_W-1:0]     per_line, line_idx, slot;
  logic [LINE_BITS-1:0] shifted, vmask;
  logic [NATIVE_W:0]    sum, high_ext;
  word_t                raw, keep, msb, high, half, rounded;
  logic                 sign, fits;

  always_comb begin
    // slot width of the precision group
    if (p_i >= 5'd11)     p_eff_o = 5'd16;
    else if (p_i >= 5'd9) p_eff_o = 5'd10;
    else if (p_i >= 5'd7) p_eff_o = 5'd8;
    else                  p_eff_o = p_i;

    per_line    = IDX_W'(LINE_BITS) / IDX_W'(p_eff_o);
    line_idx    = index_i / per_line;
    slot        = index_i - line_idx * per_line;
    line_addr_o = base_i + ADDR_W'(line_idx) * ADDR_W'(LINE_BYTES);
    bit_off_o   = OFF_W'(slot * IDX_W'(p_eff_o));

    keep = keep_mask(p_i, lsb_i);
    msb  = msb_mask(p_i, lsb_i);
    high = ~(msb - 1'b1);
    half = (lsb_i == '0) ? '0 : word_t'(1) << (lsb_i - 1'b1);

    // read: bring the slot to bit 0, align to lsb, sign-extend
    shifted  = line_i >> bit_off_o;
    raw      = shifted[NATIVE_W-1:0] << lsb_i;
    sign     = |(raw & msb);
    rvalue_o = (raw & keep) | ((high & ~msb) & {NATIVE_W{sign}});

    // write: round to nearest, saturate, place in the slot
    sum      = {wvalue_i[NATIVE_W-1], wvalue_i} + {1'b0, half};
    high_ext = {1'b1, high};
    fits     = ((sum & high_ext) == '0) || ((sum & high_ext) == high_ext);
    if (fits)                 rounded = sum[NATIVE_W-1:0] & keep;
    else if (sum[NATIVE_W])   rounded = msb;
    else                      rounded = keep & ~msb;
    vmask   = LINE_BITS'(keep >> lsb_i);
    wmask_o = vmask << bit_off_o;
    wdata_o = LINE_BITS'(rounded >> lsb_i) << bit_off_o;
  end

endmodule
