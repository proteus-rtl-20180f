// proteus_node: one accelerator node with the Proteus translation layer.
//
// The node follows the DaDianNao-style organisation the document builds
// on: N_NFU neural functional units (16), each with its own NBin, SB and
// NBout, around a shared central eDRAM (4MB) that holds the current
// layer's input and output feature maps. The central eDRAM and every SB
// hold data and weights in the per-layer reduced-precision representation;
// only NBout and the pipelines work in the native 16-bit format. An
// off-chip memory, which is not part of this RTL, fills the central eDRAM
// through the ext_* port and the SBs through the sb_* port.
//
// A small sequencer executes one command at a time (cmd_valid_i /
// cmd_ready_o handshake; done_o pulses when the command completes):
//   OP_LOAD_NBIN: count rows from central eDRAM row edram_addr are read and
//                 broadcast into NBin row nbin_addr onwards of every NFU.
//   OP_COMPUTE:   every NFU runs one compute pass (count values, NBin row
//                 nbin_addr, SB row sb_addr, NBout entry nbout_addr,
//                 accumulate) in parallel; all NFUs see the same inputs and
//                 their own weights, so each produces different outputs.
//   OP_STORE:     NFU n packs count NBout entries from nbout_addr into the
//                 output representation and writes the packed rows to the
//                 central eDRAM at edram_addr + n*edram_stride onwards. The
//                 NFUs take turns on the single eDRAM write port.
// The ext_* port may be used only while the node is idle (cmd_ready_o).
// The command set and the sequencing are this design's choices; the
// document describes the buffers, their sizes and the translation layer.
module proteus_node
  import proteus_pkg::*;
#(
  parameter int unsigned N_NFU       = 16,
  parameter int unsigned N_IN        = 16,
  parameter int unsigned N_OUT       = 16,
  parameter int unsigned NBIN_DEPTH  = 64,
  parameter int unsigned NBOUT_DEPTH = 64,
  parameter int unsigned SB_DEPTH    = 4096,
  parameter int unsigned EDRAM_DEPTH = 131072,
  localparam int unsigned NBIN_AW    = $clog2(NBIN_DEPTH),
  localparam int unsigned NBOUT_AW   = $clog2(NBOUT_DEPTH),
  localparam int unsigned SB_AW      = $clog2(SB_DEPTH),
  localparam int unsigned E_AW       = $clog2(EDRAM_DEPTH),
  localparam int unsigned NFU_AW     = (N_NFU > 1) ? $clog2(N_NFU) : 1,
  localparam int unsigned ROW_W      = N_IN * NATIVE_W,
  localparam int unsigned SB_W       = N_OUT * N_IN * NATIVE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  layer_cfg_t        cfg_i,
  // off-chip side of the central eDRAM
  input  logic              ext_we_i,
  input  logic [E_AW-1:0]   ext_addr_i,
  input  logic [ROW_W-1:0]  ext_wdata_i,
  input  logic              ext_re_i,
  output logic [ROW_W-1:0]  ext_rdata_o,
  // off-chip side of the SBs
  input  logic              sb_we_i,
  input  logic [NFU_AW-1:0] sb_nfu_i,
  input  logic [SB_AW-1:0]  sb_waddr_i,
  input  logic [SB_W-1:0]   sb_wdata_i,
  // commands
  input  logic              cmd_valid_i,
  output logic              cmd_ready_o,
  input  cmd_t              cmd_i,
  output logic              done_o,
  // events, for monitoring
  output logic              realign_o,   // an input stream skipped row padding
  output logic              flush_o      // a packer emitted a partly filled word
);

  // N_IN words per central-eDRAM row must match the NBout row width.
  if (N_IN != N_OUT) begin : g_bad_cfg
    $error("proteus_node: N_IN must equal N_OUT");
  end

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LOAD_END, S_COMP, S_COMP_WAIT, S_STORE, S_STORE_WAIT} state_e;
  state_e state_q;
  cmd_t   cmd_q;

  logic [CNT_W-1:0]  cnt_q;
  logic [NFU_AW:0]   nfu_q;
  logic [E_AW-1:0]   wrow_q;     // next eDRAM row for the storing NFU

  // central eDRAM
  logic              e_we, e_re;
  logic [E_AW-1:0]   e_waddr, e_raddr;
  logic [ROW_W-1:0]  e_wdata, e_rdata;

  // per-NFU
  logic [N_NFU-1:0]  comp_busy, comp_done, pack_busy, pack_done, out_valid, realign, flush;
  logic [ROW_W-1:0]  out_data [N_NFU];
  logic              ld_we_q;
  logic [NBIN_AW-1:0] ld_addr_q;
  logic              comp_start, pack_start;
  logic [N_NFU-1:0]  pack_start_v;

  buffer_mem #(.WIDTH(ROW_W), .DEPTH(EDRAM_DEPTH)) u_edram (
    .clk, .we_i(e_we), .waddr_i(e_waddr), .wdata_i(e_wdata),
    .rd_en_i(e_re), .raddr_i(e_raddr), .rd_data_o(e_rdata)
  );

  assign ext_rdata_o = e_rdata;

  logic [NFU_AW-1:0] cur_nfu;
  assign cur_nfu = nfu_q[NFU_AW-1:0];

  always_comb begin
    e_we    = ext_we_i;
    e_waddr = ext_addr_i;
    e_wdata = ext_wdata_i;
    e_re    = ext_re_i;
    e_raddr = ext_addr_i;
    if (state_q == S_LOAD) begin
      e_re    = 1'b1;
      e_raddr = E_AW'(cmd_q.edram_addr) + E_AW'(cnt_q);
    end
    if (state_q == S_STORE_WAIT) begin
      e_we    = out_valid[cur_nfu];
      e_waddr = wrow_q;
      e_wdata = out_data[cur_nfu];
    end
  end

  assign cmd_ready_o = (state_q == S_IDLE);
  assign comp_start  = (state_q == S_COMP);
  assign pack_start  = (state_q == S_STORE);

  always_comb begin
    pack_start_v = '0;
    pack_start_v[cur_nfu] = pack_start;
  end

  for (genvar n = 0; n < int'(N_NFU); n++) begin : g_nfu
    nfu #(
      .N_IN(N_IN), .N_OUT(N_OUT), .NBIN_DEPTH(NBIN_DEPTH),
      .NBOUT_DEPTH(NBOUT_DEPTH), .SB_DEPTH(SB_DEPTH)
    ) u_nfu (
      .clk, .rst_n, .cfg_i,
      .nbin_we_i(ld_we_q), .nbin_waddr_i(ld_addr_q), .nbin_wdata_i(e_rdata),
      .sb_we_i(sb_we_i && (sb_nfu_i == NFU_AW'(n))), .sb_waddr_i(sb_waddr_i),
      .sb_wdata_i(sb_wdata_i),
      .comp_start_i(comp_start), .comp_count_i(cmd_q.count),
      .comp_in_base_i(NBIN_AW'(cmd_q.nbin_addr)), .comp_w_base_i(SB_AW'(cmd_q.sb_addr)),
      .comp_acc_addr_i(NBOUT_AW'(cmd_q.nbout_addr)), .comp_accumulate_i(cmd_q.accumulate),
      .comp_busy_o(comp_busy[n]), .comp_done_o(comp_done[n]),
      .pack_start_i(pack_start_v[n]), .pack_count_i(cmd_q.count),
      .pack_base_i(NBOUT_AW'(cmd_q.nbout_addr)), .pack_busy_o(pack_busy[n]),
      .out_valid_o(out_valid[n]), .out_data_o(out_data[n]), .pack_done_o(pack_done[n]),
      .realign_o(realign[n]), .flush_o(flush[n])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cmd_q     <= '0;
      cnt_q     <= '0;
      nfu_q     <= '0;
      wrow_q    <= '0;
      ld_we_q   <= 1'b0;
      ld_addr_q <= '0;
      done_o    <= 1'b0;
    end else begin
      done_o  <= 1'b0;
      ld_we_q <= (state_q == S_LOAD);
      ld_addr_q <= NBIN_AW'(cmd_q.nbin_addr) + NBIN_AW'(cnt_q);
      unique case (state_q)
        S_IDLE: if (cmd_valid_i) begin
          cmd_q  <= cmd_i;
          cnt_q  <= '0;
          nfu_q  <= '0;
          wrow_q <= E_AW'(cmd_i.edram_addr);
          unique case (cmd_i.op)
            OP_LOAD_NBIN: state_q <= (cmd_i.count == '0) ? S_LOAD_END : S_LOAD;
            OP_COMPUTE:   state_q <= S_COMP;
            OP_STORE:     state_q <= S_STORE;
            default:      done_o  <= 1'b1;
          endcase
        end
        S_LOAD: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == cmd_q.count - 1'b1) state_q <= S_LOAD_END;
        end
        S_LOAD_END: begin           // last broadcast write happens this cycle
          state_q <= S_IDLE;
          done_o  <= 1'b1;
        end
        S_COMP: state_q <= S_COMP_WAIT;
        S_COMP_WAIT: if (comp_done[0]) begin
          state_q <= S_IDLE;
          done_o  <= 1'b1;
        end
        S_STORE: if (cmd_q.count == '0) begin
          state_q <= S_IDLE;
          done_o  <= 1'b1;
        end else begin
          state_q <= S_STORE_WAIT;
        end
        S_STORE_WAIT: begin
          if (out_valid[cur_nfu]) wrow_q <= wrow_q + 1'b1;
          if (pack_done[cur_nfu]) begin
            if (nfu_q == (NFU_AW+1)'(N_NFU - 1)) begin
              state_q <= S_IDLE;
              done_o  <= 1'b1;
            end else begin
              nfu_q   <= nfu_q + 1'b1;
              wrow_q  <= E_AW'(cmd_q.edram_addr) + E_AW'(cmd_q.edram_stride) * E_AW'(nfu_q + 1'b1);
              state_q <= S_STORE;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign realign_o = |realign;
  assign flush_o   = |flush;

  // All NFUs run compute passes in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               comp_done[0] |-> &comp_done)
    else $error("NFUs finished a compute pass out of step");
  a_ext_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               (ext_we_i || ext_re_i) |-> state_q == S_IDLE)
    else $error("off-chip eDRAM access while a command runs");

  logic unused;
  assign unused = ^{comp_busy, pack_busy};

endmodule
