// unpack_ctrl: the control block of one buffer's unpackers. All unpackers
// of a buffer (16 for NBin, 256 for SB) read the same row each cycle and
// decode values of the same precision in lock step, so one controller
// drives them all with shared wide control signals.
//
// A run delivers count_i values, one per cycle, starting at buffer row
// base_i. Values of the stream are packed LSB first, back to back across
// rows; after every stream_len values (0 = never) the next value starts on a
// fresh row, which is the alignment rule for sliding-window streams. A
// buffer row is read only when the next value needs a word that is not yet
// in the unpacking register; with P <= 16 at most one row is needed per
// value, so the unpackers produce one value every cycle.
//
// Timing (cycles after the controller handles value k in cycle t):
//   t   : rd_en_o / rd_addr_o for the row value k needs (if any)
//   t+1 : buffer data valid; load_lo_o / load_hi_o load it (row parity)
//   t+2 : rot/keep/above/msb select value k; valid_o, last_o
// The row-to-half assignment by row parity and the exact latencies are this
// design's choices; the document gives the register, shifter and masks.
module unpack_ctrl
  import proteus_pkg::*;
#(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  repr_t             repr_i,
  input  logic [ADDR_W-1:0] base_i,
  input  logic [CNT_W-1:0]  count_i,
  output logic              busy_o,
  // buffer read port
  output logic              rd_en_o,
  output logic [ADDR_W-1:0] rd_addr_o,
  // shared unpacker controls
  output logic              load_lo_o,
  output logic              load_hi_o,
  output logic [ROT_W-1:0]  rot_o,
  output word_t             keep_o,
  output word_t             above_o,
  output word_t             msb_o,
  output logic              valid_o,
  output logic              last_o,
  output logic              realign_o   // pulse: a stream ended mid-row and padding was skipped
);

  logic              active_q;
  repr_t             repr_q;
  logic [ADDR_W-1:0] row_q, fetch_q;
  logic [POS_W-1:0]  bit_q;
  logic [CNT_W-1:0]  left_q, scnt_q;

  logic [5:0]        nb;
  logic              straddle, fetch, end_stream, last;
  logic [ADDR_W-1:0] adv_row;
  logic [POS_W-1:0]  adv_bit;
  logic [ROT_W-1:0]  rot;

  // delay line
  logic              ld_d1, ldhi_d1, v_d1, last_d1, v_d2, last_d2;
  logic [ROT_W-1:0]  rot_d1, rot_d2;
  word_t             keep_d1, keep_d2, above_d1, above_d2, msb_d1, msb_d2;

  always_comb begin
    nb         = 6'(bit_q) + 6'(repr_q.p);
    straddle   = nb > 6'd16;
    fetch      = active_q && ((fetch_q == row_q) || straddle);
    end_stream = (repr_q.stream_len != '0) && (scnt_q == repr_q.stream_len - 1'b1);
    last       = (left_q == CNT_W'(1));
    adv_row    = row_q + ADDR_W'(nb >= 6'd16);
    adv_bit    = nb[POS_W-1:0];
    if (end_stream && adv_bit != '0) begin
      adv_row = adv_row + 1'b1;
      adv_bit = '0;
    end
    rot        = ROT_W'({row_q[0], bit_q}) - ROT_W'(repr_q.lsb);
  end

  assign busy_o    = active_q;
  assign rd_en_o   = fetch;
  assign rd_addr_o = fetch_q;
  assign realign_o = active_q && end_stream && (adv_row != row_q + ADDR_W'(nb >= 6'd16));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      repr_q   <= '0;
      row_q    <= '0;
      fetch_q  <= '0;
      bit_q    <= '0;
      left_q   <= '0;
      scnt_q   <= '0;
    end else if (start_i && !active_q) begin
      active_q <= (count_i != '0);
      repr_q   <= repr_i;
      row_q    <= base_i;
      fetch_q  <= base_i;
      bit_q    <= '0;
      left_q   <= count_i;
      scnt_q   <= '0;
    end else if (active_q) begin
      if (fetch) fetch_q <= fetch_q + 1'b1;
      row_q    <= adv_row;
      bit_q    <= adv_bit;
      scnt_q   <= end_stream ? '0 : scnt_q + 1'b1;
      left_q   <= left_q - 1'b1;
      if (last) active_q <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_d1 <= 1'b0; ldhi_d1 <= 1'b0; v_d1 <= 1'b0; last_d1 <= 1'b0;
      v_d2 <= 1'b0; last_d2 <= 1'b0;
      rot_d1 <= '0; rot_d2 <= '0;
      keep_d1 <= '0; keep_d2 <= '0; above_d1 <= '0; above_d2 <= '0;
      msb_d1 <= '0; msb_d2 <= '0;
    end else begin
      ld_d1    <= fetch;
      ldhi_d1  <= fetch_q[0];
      v_d1     <= active_q;
      last_d1  <= active_q && last;
      rot_d1   <= rot;
      keep_d1  <= keep_mask(repr_q.p, repr_q.lsb);
      above_d1 <= above_mask(repr_q.p, repr_q.lsb);
      msb_d1   <= msb_mask(repr_q.p, repr_q.lsb);
      v_d2     <= v_d1;
      last_d2  <= last_d1;
      rot_d2   <= rot_d1;
      keep_d2  <= keep_d1;
      above_d2 <= above_d1;
      msb_d2   <= msb_d1;
    end
  end

  assign load_lo_o = ld_d1 && !ldhi_d1;
  assign load_hi_o = ld_d1 && ldhi_d1;
  assign rot_o     = rot_d2;
  assign keep_o    = keep_d2;
  assign above_o   = above_d2;
  assign msb_o     = msb_d2;
  assign valid_o   = v_d2;
  assign last_o    = last_d2;

endmodule
