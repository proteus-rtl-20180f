// unpacker: converts one virtual column of packed P-bit values back to the
// 16-bit native fixed-point format (translation layer, read side).
//
// A virtual column is a 16-bit wide column of a buffer in which the values
// of a stream are stored back to back, LSB first, across successive rows. A
// value may therefore straddle two rows. The unpacker, as the document
// draws it, has three steps:
//   1. a 32-bit unpacking register whose lower and upper halves are loaded
//      alternately (load_lo / load_hi) with buffer words, so a value split
//      over two words is whole in the register;
//   2. a 32-bit circular right shifter that brings the value's LSB to the
//      native bit position of the layer's fixed exponent (the wrap from bit
//      31 to bit 0 rejoins a value split over an odd and an even row);
//   3. an extender that keeps the value bits, sign-extends above the MSB and
//      zero-fills below the LSB.
// Step 3 is steered by wide masks (keep, above, msb one-hot) rather than an
// encoded P, so that the many unpackers of one buffer, which run in lock
// step, share one decoder in the buffer's control block (unpack_ctrl).
//
// Timing: the register loads on the clock edge; value_o is combinational
// from the register and the current rot/mask inputs.
module unpacker
  import proteus_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  word_t            word_i,      // packed word read from the buffer
  input  logic             load_lo_i,   // load word_i into bits [15:0]
  input  logic             load_hi_i,   // load word_i into bits [31:16]
  input  logic [ROT_W-1:0] rot_i,       // right-rotate amount
  input  word_t            keep_i,      // value bits after rotation
  input  word_t            above_i,     // bits to fill with the sign
  input  word_t            msb_i,       // one-hot position of the value's MSB
  output word_t            value_o      // native 16-bit value
);

  reg_t unpack_q;
  reg_t rotated;
  word_t aligned;
  logic sign;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unpack_q <= '0;
    end else begin
      if (load_lo_i) unpack_q[NATIVE_W-1:0]     <= word_i;
      if (load_hi_i) unpack_q[REG_W-1:NATIVE_W] <= word_i;
    end
  end

  always_comb begin
    rotated = (unpack_q >> rot_i) | (unpack_q << (6'(REG_W) - 6'(rot_i)));
    aligned = rotated[NATIVE_W-1:0];
    sign    = |(aligned & msb_i);
    value_o = (aligned & keep_i) | (above_i & {NATIVE_W{sign}});
  end

endmodule
