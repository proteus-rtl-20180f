// packer: converts 16-bit native values to the P-bit storage representation
// and packs them back to back into 16-bit words of one virtual column
// (translation layer, write side). It mirrors the unpacker.
//
//   Round:    adds half an LSB of the P-bit format (round to nearest, ties
//             upward) and saturates to the largest or smallest P-bit value
//             when the result is out of range. Bits outside the value are
//             cleared, so the output holds the value at native bits
//             [LSB+P-1:LSB].
//   Shifter:  a 32-bit circular right shifter moves the value to the next
//             free bit position of the packing register.
//   Register: a 32-bit packing register with one enable per bit; only the
//             P bits of the value are loaded (en_i is a 32-bit mask).
//   Output:   a 2:1 multiplexer picks the completed lower (sel_i = 0) or
//             upper (sel_i = 1) half as the packed word.
// The masks (half, keep, msb, high) are computed once per buffer in
// pack_ctrl and shared by all packers running in lock step.
//
// Timing: the register loads on the clock edge when load_i is high; word_o
// is combinational from the register and sel_i.
module packer
  import proteus_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  word_t            value_i,   // native value from NBout
  input  logic             load_i,    // write the rotated value into the register
  input  word_t            half_i,    // half an LSB of the P-bit format (0 if LSB = 0)
  input  word_t            keep_i,    // value bits [LSB+P-1:LSB]
  input  word_t            msb_i,     // one-hot MSB of the value
  input  word_t            high_i,    // bits from the MSB upward
  input  logic [ROT_W-1:0] rot_i,     // right-rotate amount
  input  reg_t             en_i,      // per-bit register enables
  input  logic             sel_i,     // half of the register to output
  output word_t            word_o     // packed word
);

  logic [NATIVE_W:0] sum;
  logic [NATIVE_W:0] high_ext;
  logic              fits, negative;
  word_t             rounded;
  reg_t              rot_in, shifted;
  reg_t              pack_q;

  always_comb begin
    // Round to nearest in 17 bits so that rounding cannot wrap around.
    sum      = {value_i[NATIVE_W-1], value_i} + {1'b0, half_i};
    high_ext = {1'b1, high_i};
    negative = sum[NATIVE_W];
    // In range when every bit from the MSB upward equals the sign.
    fits     = ((sum & high_ext) == '0) || ((sum & high_ext) == high_ext);
    if (fits)          rounded = sum[NATIVE_W-1:0] & keep_i;
    else if (negative) rounded = msb_i;                 // smallest value 100..0
    else               rounded = keep_i & ~msb_i;       // largest value 011..1
    rot_in  = {{NATIVE_W{1'b0}}, rounded};
    shifted = (rot_in >> rot_i) | (rot_in << (6'(REG_W) - 6'(rot_i)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack_q <= '0;
    end else if (load_i) begin
      pack_q <= (pack_q & ~en_i) | (shifted & en_i);
    end
  end

  assign word_o = sel_i ? pack_q[REG_W-1:NATIVE_W] : pack_q[NATIVE_W-1:0];

endmodule
