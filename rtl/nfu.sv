// nfu: one Neural Functional Unit with the Proteus translation layer.
//
// NBin and SB hold input data and weights in the layer's reduced-precision
// storage representation, packed within 16-bit virtual columns. Each buffer
// has one unpacker per column (N_IN for NBin, N_OUT*N_IN for SB) and one
// unpack_ctrl that drives them all, so the pipeline receives one native
// value per lane every cycle. NBout keeps partial and final sums in native
// precision; the N_OUT packers after it convert results to the output
// representation only when they leave the NFU for the central eDRAM.
//
// Commands (one at a time; the *_busy_o outputs are high while one runs):
//   compute: comp_count_i values are streamed from NBin row comp_in_base_i
//            and SB row comp_w_base_i; output o accumulates
//            sum_k sum_i x[i][k] * w[o*N_IN+i][k] starting from NBout entry
//            comp_acc_addr_i (comp_accumulate_i = 1) or from zero, and the
//            result is written back to that entry. comp_done_o pulses then.
//   pack:    pack_count_i NBout entries from pack_base_i are rounded, packed
//            and emitted as rows on out_valid_o / out_data_o; pack_done_o
//            marks the last row.
// comp_count_i must be at least 1. Buffer rows hold word c of a row at bits
// [16c+15:16c]. The buffer organisation and translation layer follow the
// document; the command interface is this design's own.
module nfu
  import proteus_pkg::*;
#(
  parameter int unsigned N_IN        = 16,
  parameter int unsigned N_OUT       = 16,
  parameter int unsigned NBIN_DEPTH  = 64,
  parameter int unsigned NBOUT_DEPTH = 64,
  parameter int unsigned SB_DEPTH    = 4096,
  localparam int unsigned NBIN_AW    = $clog2(NBIN_DEPTH),
  localparam int unsigned NBOUT_AW   = $clog2(NBOUT_DEPTH),
  localparam int unsigned SB_AW      = $clog2(SB_DEPTH),
  localparam int unsigned IN_W       = N_IN * NATIVE_W,
  localparam int unsigned OUT_W      = N_OUT * NATIVE_W,
  localparam int unsigned SB_W       = N_OUT * N_IN * NATIVE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  layer_cfg_t          cfg_i,
  // NBin fill (from the central eDRAM)
  input  logic                nbin_we_i,
  input  logic [NBIN_AW-1:0]  nbin_waddr_i,
  input  logic [IN_W-1:0]     nbin_wdata_i,
  // SB fill (from off-chip memory)
  input  logic                sb_we_i,
  input  logic [SB_AW-1:0]    sb_waddr_i,
  input  logic [SB_W-1:0]     sb_wdata_i,
  // compute command
  input  logic                comp_start_i,
  input  logic [CNT_W-1:0]    comp_count_i,
  input  logic [NBIN_AW-1:0]  comp_in_base_i,
  input  logic [SB_AW-1:0]    comp_w_base_i,
  input  logic [NBOUT_AW-1:0] comp_acc_addr_i,
  input  logic                comp_accumulate_i,
  output logic                comp_busy_o,
  output logic                comp_done_o,
  // pack command
  input  logic                pack_start_i,
  input  logic [CNT_W-1:0]    pack_count_i,
  input  logic [NBOUT_AW-1:0] pack_base_i,
  output logic                pack_busy_o,
  output logic                out_valid_o,
  output logic [OUT_W-1:0]    out_data_o,
  output logic                pack_done_o,
  // events
  output logic                realign_o,
  output logic                flush_o
);

  // ---------------- NBin side ----------------
  logic                nbin_re, nbin_ldlo, nbin_ldhi, nbin_valid, nbin_last, nbin_realign;
  logic [NBIN_AW-1:0]  nbin_raddr;
  logic [IN_W-1:0]     nbin_rdata;
  logic [ROT_W-1:0]    nbin_rot;
  word_t               nbin_keep, nbin_above, nbin_msb;
  logic                nbin_busy;

  logic                comp_go, pack_go;
  logic                comp_q, accum_q;
  logic [NBOUT_AW-1:0] acc_addr_q;
  logic                init_q;

  assign comp_go = comp_start_i && !comp_q && !pack_busy_o;
  assign pack_go = pack_start_i && !pack_busy_o && !comp_q;

  buffer_mem #(.WIDTH(IN_W), .DEPTH(NBIN_DEPTH)) u_nbin (
    .clk, .we_i(nbin_we_i), .waddr_i(nbin_waddr_i), .wdata_i(nbin_wdata_i),
    .rd_en_i(nbin_re), .raddr_i(nbin_raddr), .rd_data_o(nbin_rdata)
  );

  unpack_ctrl #(.ADDR_W(NBIN_AW)) u_nbin_ctrl (
    .clk, .rst_n, .start_i(comp_go), .repr_i(cfg_i.data_in),
    .base_i(comp_in_base_i), .count_i(comp_count_i), .busy_o(nbin_busy),
    .rd_en_o(nbin_re), .rd_addr_o(nbin_raddr),
    .load_lo_o(nbin_ldlo), .load_hi_o(nbin_ldhi), .rot_o(nbin_rot),
    .keep_o(nbin_keep), .above_o(nbin_above), .msb_o(nbin_msb),
    .valid_o(nbin_valid), .last_o(nbin_last), .realign_o(nbin_realign)
  );

  word_t x [N_IN];
  for (genvar i = 0; i < int'(N_IN); i++) begin : g_nbin_unpack
    unpacker u_unpack (
      .clk, .rst_n, .word_i(nbin_rdata[i*NATIVE_W +: NATIVE_W]),
      .load_lo_i(nbin_ldlo), .load_hi_i(nbin_ldhi), .rot_i(nbin_rot),
      .keep_i(nbin_keep), .above_i(nbin_above), .msb_i(nbin_msb),
      .value_o(x[i])
    );
  end

  // ---------------- SB side ----------------
  logic                sb_re, sb_ldlo, sb_ldhi, sb_valid, sb_last, sb_realign, sb_busy;
  logic [SB_AW-1:0]    sb_raddr;
  logic [SB_W-1:0]     sb_rdata;
  logic [ROT_W-1:0]    sb_rot;
  word_t               sb_keep, sb_above, sb_msb;

  buffer_mem #(.WIDTH(SB_W), .DEPTH(SB_DEPTH)) u_sb (
    .clk, .we_i(sb_we_i), .waddr_i(sb_waddr_i), .wdata_i(sb_wdata_i),
    .rd_en_i(sb_re), .raddr_i(sb_raddr), .rd_data_o(sb_rdata)
  );

  unpack_ctrl #(.ADDR_W(SB_AW)) u_sb_ctrl (
    .clk, .rst_n, .start_i(comp_go), .repr_i(cfg_i.weight),
    .base_i(comp_w_base_i), .count_i(comp_count_i), .busy_o(sb_busy),
    .rd_en_o(sb_re), .rd_addr_o(sb_raddr),
    .load_lo_o(sb_ldlo), .load_hi_o(sb_ldhi), .rot_o(sb_rot),
    .keep_o(sb_keep), .above_o(sb_above), .msb_o(sb_msb),
    .valid_o(sb_valid), .last_o(sb_last), .realign_o(sb_realign)
  );

  word_t w [N_OUT*N_IN];
  for (genvar j = 0; j < int'(N_OUT*N_IN); j++) begin : g_sb_unpack
    unpacker u_unpack (
      .clk, .rst_n, .word_i(sb_rdata[j*NATIVE_W +: NATIVE_W]),
      .load_lo_i(sb_ldlo), .load_hi_i(sb_ldhi), .rot_i(sb_rot),
      .keep_i(sb_keep), .above_i(sb_above), .msb_i(sb_msb),
      .value_o(w[j])
    );
  end

  // ---------------- pipeline and NBout ----------------
  logic                nbout_re, nbout_we;
  logic [NBOUT_AW-1:0] nbout_raddr;
  logic [OUT_W-1:0]    nbout_rdata, nbout_wdata;
  word_t               init_val [N_OUT];
  word_t               res [N_OUT];
  logic                res_valid;

  logic                pk_busy, pk_re, pk_load, pk_sel, pk_wvalid, pk_done, pk_flush;
  logic [NBOUT_AW-1:0] pk_raddr;
  word_t               pk_half, pk_keep, pk_msb, pk_high;
  logic [ROT_W-1:0]    pk_rot;
  reg_t                pk_en;

  assign nbout_re    = comp_go || pk_re;
  assign nbout_raddr = comp_go ? comp_acc_addr_i : pk_raddr;

  always_comb begin
    for (int o = 0; o < int'(N_OUT); o++) begin
      init_val[o] = accum_q ? nbout_rdata[o*NATIVE_W +: NATIVE_W] : '0;
      nbout_wdata[o*NATIVE_W +: NATIVE_W] = res[o];
    end
  end

  nfu_pipeline #(.N_IN(N_IN), .N_OUT(N_OUT)) u_pipe (
    .clk, .rst_n, .init_i(init_q), .init_val_i(init_val),
    .valid_i(nbin_valid), .last_i(nbin_last), .x_i(x), .w_i(w),
    .res_valid_o(res_valid), .res_o(res)
  );

  assign nbout_we = res_valid;

  buffer_mem #(.WIDTH(OUT_W), .DEPTH(NBOUT_DEPTH)) u_nbout (
    .clk, .we_i(nbout_we), .waddr_i(acc_addr_q), .wdata_i(nbout_wdata),
    .rd_en_i(nbout_re), .raddr_i(nbout_raddr), .rd_data_o(nbout_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_q     <= 1'b0;
      accum_q    <= 1'b0;
      acc_addr_q <= '0;
      init_q     <= 1'b0;
    end else begin
      init_q <= comp_go;
      if (comp_go) begin
        comp_q     <= 1'b1;
        accum_q    <= comp_accumulate_i;
        acc_addr_q <= comp_acc_addr_i;
      end else if (res_valid) begin
        comp_q <= 1'b0;
      end
    end
  end

  assign comp_busy_o = comp_q;
  assign comp_done_o = res_valid;

  // ---------------- packers ----------------
  pack_ctrl #(.ADDR_W(NBOUT_AW)) u_pack_ctrl (
    .clk, .rst_n, .start_i(pack_go), .repr_i(cfg_i.data_out),
    .base_i(pack_base_i), .count_i(pack_count_i), .busy_o(pk_busy),
    .rd_en_o(pk_re), .rd_addr_o(pk_raddr),
    .load_o(pk_load), .half_o(pk_half), .keep_o(pk_keep), .msb_o(pk_msb),
    .high_o(pk_high), .rot_o(pk_rot), .en_o(pk_en),
    .sel_o(pk_sel), .wvalid_o(pk_wvalid), .done_o(pk_done), .flush_o(pk_flush)
  );

  for (genvar o = 0; o < int'(N_OUT); o++) begin : g_pack
    packer u_pack (
      .clk, .rst_n, .value_i(nbout_rdata[o*NATIVE_W +: NATIVE_W]),
      .load_i(pk_load), .half_i(pk_half), .keep_i(pk_keep), .msb_i(pk_msb),
      .high_i(pk_high), .rot_i(pk_rot), .en_i(pk_en), .sel_i(pk_sel),
      .word_o(out_data_o[o*NATIVE_W +: NATIVE_W])
    );
  end

  // The pack command stays busy until its last word has left.
  logic pack_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           pack_q <= 1'b0;
    else if (pack_go)     pack_q <= (pack_count_i != '0);
    else if (pk_done)     pack_q <= 1'b0;
  end

  assign pack_busy_o = pack_q;
  assign out_valid_o = pk_wvalid;
  assign pack_done_o = pk_done;
  assign realign_o   = nbin_realign || sb_realign;
  assign flush_o     = pk_flush;

  // The two unpack controllers run the same count in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) nbin_valid == sb_valid)
    else $error("NBin and SB unpackers out of step");
  a_count: assert property (@(posedge clk) disable iff (!rst_n) comp_go |-> comp_count_i != '0)
    else $error("compute command with zero values");

  logic unused;
  assign unused = ^{nbin_busy, sb_busy, sb_last, sb_valid, pk_busy};

endmodule
