// pack_ctrl: the control block of one buffer's packers (the 16 packers that
// sit after NBout). It reads count_i native values from NBout, one per
// cycle starting at entry base_i, and steers all packers in lock step with
// shared wide controls: rounding masks, rotate amount and the 32-bit
// register-enable mask that writes only the P value bits at the next free
// position. Whenever a value fills the current 16-bit word, that word is
// emitted through the packers' output multiplexer.
//
// Values are packed LSB first, back to back across words. At the end of a
// stream (every stream_len values, 0 = never) and at the end of the run a
// partly filled word is emitted in an extra cycle (a flush) and the next
// value starts a fresh word, so that each stream begins aligned. Bits of a
// flushed word beyond the last value are padding and carry no meaning.
//
// Timing (a value read in cycle t): NBout data and the packer controls in
// t+1, the packing register updates at the end of t+1, and a completed word
// is presented with wvalid_o in t+2. done_o marks the last word of the run.
// The flush cycle and these latencies are this design's choices.
module pack_ctrl
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
  // NBout read port
  output logic              rd_en_o,
  output logic [ADDR_W-1:0] rd_addr_o,
  // shared packer controls (cycle after the read)
  output logic              load_o,
  output word_t             half_o,
  output word_t             keep_o,
  output word_t             msb_o,
  output word_t             high_o,
  output logic [ROT_W-1:0]  rot_o,
  output reg_t              en_o,
  // word emission (two cycles after the read)
  output logic              sel_o,
  output logic              wvalid_o,
  output logic              done_o,
  output logic              flush_o     // pulse: a partly filled word was emitted
);

  logic              active_q, flush_q;
  repr_t             repr_q;
  logic [ADDR_W-1:0] addr_q;
  logic [CNT_W-1:0]  row_q;     // word index within the run (parity used)
  logic [POS_W-1:0]  bit_q;
  logic [CNT_W-1:0]  left_q, scnt_q;

  logic [5:0]        nb;
  logic              do_value, complete, end_stream, last;
  logic [POS_W:0]    pos;
  logic [POS_W-1:0]  adv_bit;
  logic [REG_W-1:0]  pmask;

  logic              ld_d1, em_d1, sel_d1, done_d1;
  logic              em_d2, sel_d2, done_d2, fl_d1, fl_d2;
  logic [ROT_W-1:0]  rot_d1;
  reg_t              en_d1;

  always_comb begin
    do_value   = active_q && !flush_q;
    nb         = 6'(bit_q) + 6'(repr_q.p);
    complete   = nb >= 6'd16;
    adv_bit    = nb[POS_W-1:0];
    end_stream = (repr_q.stream_len != '0) && (scnt_q == repr_q.stream_len - 1'b1);
    last       = (left_q == CNT_W'(1));
    pos        = {row_q[0], bit_q};
    pmask      = REG_W'((33'd1 << repr_q.p) - 33'd1);
    pmask      = (pmask << pos) | (pmask >> (6'(REG_W) - 6'(pos)));
  end

  assign busy_o    = active_q;
  assign rd_en_o   = do_value;
  assign rd_addr_o = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      flush_q  <= 1'b0;
      repr_q   <= '0;
      addr_q   <= '0;
      row_q    <= '0;
      bit_q    <= '0;
      left_q   <= '0;
      scnt_q   <= '0;
    end else if (start_i && !active_q) begin
      active_q <= (count_i != '0);
      flush_q  <= 1'b0;
      repr_q   <= repr_i;
      addr_q   <= base_i;
      row_q    <= '0;
      bit_q    <= '0;
      left_q   <= count_i;
      scnt_q   <= '0;
    end else if (active_q) begin
      if (flush_q) begin
        flush_q <= 1'b0;
        row_q   <= row_q + 1'b1;
        bit_q   <= '0;
        if (left_q == '0) active_q <= 1'b0;
      end else begin
        addr_q <= addr_q + 1'b1;
        left_q <= left_q - 1'b1;
        scnt_q <= end_stream ? '0 : scnt_q + 1'b1;
        row_q  <= row_q + CNT_W'(complete);
        bit_q  <= adv_bit;
        if ((end_stream || last) && adv_bit != '0) flush_q <= 1'b1;
        else if (last) active_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_d1 <= 1'b0; em_d1 <= 1'b0; sel_d1 <= 1'b0; done_d1 <= 1'b0;
      em_d2 <= 1'b0; sel_d2 <= 1'b0; done_d2 <= 1'b0; fl_d1 <= 1'b0; fl_d2 <= 1'b0;
      rot_d1 <= '0; en_d1 <= '0;
      half_o <= '0; keep_o <= '0; msb_o <= '0; high_o <= '0;
    end else begin
      ld_d1   <= do_value;
      em_d1   <= active_q && (flush_q || complete);
      sel_d1  <= row_q[0];
      done_d1 <= active_q && (flush_q ? (left_q == '0) : (last && adv_bit == '0));
      fl_d1   <= active_q && flush_q;
      fl_d2   <= fl_d1;
      rot_d1  <= ROT_W'(repr_q.lsb) - ROT_W'(pos);
      en_d1   <= pmask;
      half_o  <= (repr_q.lsb == '0) ? '0 : word_t'(1) << (repr_q.lsb - 1'b1);
      keep_o  <= keep_mask(repr_q.p, repr_q.lsb);
      msb_o   <= msb_mask(repr_q.p, repr_q.lsb);
      high_o  <= ~(msb_mask(repr_q.p, repr_q.lsb) - 1'b1);
      em_d2   <= em_d1;
      sel_d2  <= sel_d1;
      done_d2 <= done_d1;
    end
  end

  assign load_o   = ld_d1;
  assign rot_o    = rot_d1;
  assign en_o     = en_d1;
  assign sel_o    = sel_d2;
  assign wvalid_o = em_d2;
  assign done_o   = done_d2;
  assign flush_o  = fl_d2;

endmodule
