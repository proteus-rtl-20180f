// tb_node_run: end-to-end test body for proteus_top, shared by the
// reduced-size, full-size and workload testbenches (FULL = 1 instantiates
// the top with its default parameters; the size parameters here must then
// equal those defaults).
//
// It runs LAYERS consecutive layers through the node's command interface,
// each with its own data, weight and output precisions. Layer 1 inputs
// are packed by the reference model and written to the central eDRAM over
// the off-chip port; weights are packed per NFU and entry and written to
// the SBs. Each layer is LOAD_NBIN, one COMPUTE per output entry (odd
// entries get a second, accumulating pass), then STORE. The packed results
// of every NFU are read back and compared with the model on the bits that
// hold values. Layer 2 takes NFU 0's packed layer-1 output straight from
// the eDRAM as its input, so the output precision of one layer is the input
// precision of the next. Re-alignment, flushes, accumulation, saturation,
// values straddling two rows and the change of precision between layers
// are counted, and each must occur. The compute command latency (K + 7
// cycles from the command cycle to done_o) is checked.
//
// With WORKLOADS = 1 the same flow runs, one network after another, the
// per-layer data precisions and the uniform weight precision of LeNet,
// Convnet, AlexNet, NiN and GoogLeNet, every layer reading the previous
// layer's packed output. Each layer's exponent keeps data within about
// +-2 and weights within +-2.
//
// The GPU remapping is exercised alongside: a random array is stored
// element by element into modelled cache lines through the write path and
// read back through the read path, for every precision.
//
// The wrapping testbench owns the watchdog, prints the TB_RESULT line from
// checks and failures once finished is set, and ends the simulation.
module tb_node_run
  import proteus_pkg::*;
  import tb_model_pkg::*;
#(
  parameter int N_NFU = 3,
  parameter int N_IN = 4,
  parameter int N_OUT = 4,
  parameter int SB_DEPTH = 128,
  parameter int EDRAM_DEPTH = 256,
  parameter int LAYERS = 2,
  parameter int K1 = 12,
  parameter int E1 = 6,
  parameter int E2 = 3,
  parameter bit FULL = 0,
  parameter bit WORKLOADS = 0,
  parameter int SEED = 1
) ();
  localparam int NL = N_IN * N_OUT;
  localparam int E_AW = $clog2(EDRAM_DEPTH);
  localparam int SB_AW = $clog2(SB_DEPTH);
  localparam int NFU_AW = (N_NFU > 1) ? $clog2(N_NFU) : 1;

  logic clk = 1'b0, rst_n = 1'b0;
  layer_cfg_t cfg;
  logic ext_we, ext_re, sb_we, cmd_valid, cmd_ready, done, realign, flush;
  logic [E_AW-1:0] ext_addr;
  logic [N_IN*16-1:0] ext_wdata, ext_rdata;
  logic [NFU_AW-1:0] sb_nfu;
  logic [SB_AW-1:0] sb_waddr;
  logic [NL*16-1:0] sb_wdata;
  cmd_t cmd;
  int checks = 0, failures = 0;
  bit finished = 1'b0;  // set when the run is complete; the wrapper reports and ends
  int n_realign = 0, n_flush = 0, n_accum = 0, n_sat = 0, n_straddle = 0, n_switch = 0;

  // GPU remapping ports
  logic [31:0] g_base, g_laddr;
  logic [23:0] g_idx;
  logic [4:0] g_p, g_peff;
  logic [3:0] g_lsb;
  logic [9:0] g_off;
  logic [1023:0] g_line, g_wdata, g_wmask;
  word_t g_rval, g_wval;

  if (FULL) begin : g_full
    proteus_top u_dut (
      .clk, .rst_n, .cfg_i(cfg), .ext_we_i(ext_we), .ext_addr_i(ext_addr), .ext_wdata_i(ext_wdata),
      .ext_re_i(ext_re), .ext_rdata_o(ext_rdata), .sb_we_i(sb_we), .sb_nfu_i(sb_nfu),
      .sb_waddr_i(sb_waddr), .sb_wdata_i(sb_wdata), .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready),
      .cmd_i(cmd), .done_o(done), .realign_o(realign), .flush_o(flush),
      .gpu_base_i(g_base), .gpu_index_i(g_idx), .gpu_p_i(g_p), .gpu_lsb_i(g_lsb),
      .gpu_p_eff_o(g_peff), .gpu_line_addr_o(g_laddr), .gpu_bit_off_o(g_off),
      .gpu_line_i(g_line), .gpu_rvalue_o(g_rval), .gpu_wvalue_i(g_wval),
      .gpu_wdata_o(g_wdata), .gpu_wmask_o(g_wmask));
  end else begin : g_small
    proteus_top #(.N_NFU(N_NFU), .N_IN(N_IN), .N_OUT(N_OUT), .NBIN_DEPTH(64), .NBOUT_DEPTH(64),
                  .SB_DEPTH(SB_DEPTH), .EDRAM_DEPTH(EDRAM_DEPTH)) u_dut (
      .clk, .rst_n, .cfg_i(cfg), .ext_we_i(ext_we), .ext_addr_i(ext_addr), .ext_wdata_i(ext_wdata),
      .ext_re_i(ext_re), .ext_rdata_o(ext_rdata), .sb_we_i(sb_we), .sb_nfu_i(sb_nfu),
      .sb_waddr_i(sb_waddr), .sb_wdata_i(sb_wdata), .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready),
      .cmd_i(cmd), .done_o(done), .realign_o(realign), .flush_o(flush),
      .gpu_base_i(g_base), .gpu_index_i(g_idx), .gpu_p_i(g_p), .gpu_lsb_i(g_lsb),
      .gpu_p_eff_o(g_peff), .gpu_line_addr_o(g_laddr), .gpu_bit_off_o(g_off),
      .gpu_line_i(g_line), .gpu_rvalue_o(g_rval), .gpu_wvalue_i(g_wval),
      .gpu_wdata_o(g_wdata), .gpu_wmask_o(g_wmask));
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (realign) n_realign++;
    if (flush) n_flush++;
  end


  function automatic repr_t mk(input int p, input int lsb, input int sl);
    repr_t r;
    r.p = 5'(p); r.lsb = 4'(lsb); r.stream_len = CNT_W'(sl);
    return r;
  endfunction

  // Issue one command and wait for done_o; returns cycles from the command
  // cycle to done_o.
  task automatic run_cmd(input cmd_t c, output int cycles);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  int n_gpu_pad = 0, n_gpu_group = 0;

  // Table of per-layer data precisions and the uniform weight precision.
  function automatic int net_layers(input int net);
    case (net) 0: return 4; 1: return 5; 2: return 7; default: return 11; endcase
  endfunction
  function automatic int net_data_p(input int net, input int l);
    int lenet [4] = '{2, 4, 3, 3};
    int convnet [5] = '{8, 7, 7, 5, 5};
    int alexnet [7] = '{10, 8, 8, 8, 8, 6, 4};
    int nin [11] = '{10, 10, 9, 12, 12, 11, 11, 11, 10, 10, 9};
    int googlenet [11] = '{14, 10, 12, 12, 12, 12, 11, 11, 11, 10, 9};
    case (net) 0: return lenet[l]; 1: return convnet[l]; 2: return alexnet[l];
      3: return nin[l]; default: return googlenet[l]; endcase
  endfunction
  function automatic int net_weight_p(input int net);
    case (net) 0: return 7; 1: return 9; 2: return 10; 3: return 10; default: return 9; endcase
  endfunction
  function automatic string net_name(input int net);
    case (net) 0: return "LeNet"; 1: return "Convnet"; 2: return "AlexNet"; 3: return "NiN";
      default: return "GoogLeNet"; endcase
  endfunction

  // GPU remapping: store an array element by element into modelled lines
  // through the write path, then read every element back.
  task automatic gpu_check();
    logic [1023:0] lines [8];
    int qv [$];
    int per, pe, x;
    for (int p = 1; p <= 16; p++) begin
      for (int l = 0; l < 8; l++) for (int w = 0; w < 32; w++) lines[l][w*32 +: 32] = $urandom();
      qv.delete();
      pe = (p >= 11) ? 16 : (p >= 9) ? 10 : (p >= 7) ? 8 : p;
      per = 1024 / pe;
      if (per * pe != 1024) n_gpu_pad++;
      if (pe != p) n_gpu_group++;
      g_base = 32'h1000; g_p = 5'(p); g_lsb = 4'((p < 11) ? 11 - p : 0);
      for (int i = 0; i < 3 * per && i < 500; i++) begin
        x = sext($urandom(), 16) >>> ($urandom() % 8);
        qv.push_back(quant(x, p, int'(g_lsb)));
        g_idx = 24'(i); g_wval = x[15:0];
        #1;
        checks++;
        if (g_laddr != 32'h1000 + 32'((i / per) * 128)) begin
          failures++; $display("FAIL gpu line address p=%0d i=%0d", p, i);
        end
        lines[(g_laddr - 32'h1000) / 128] = (lines[(g_laddr - 32'h1000) / 128] & ~g_wmask) | (g_wdata & g_wmask);
      end
      for (int i = 0; i < qv.size(); i++) begin
        g_idx = 24'(i);
        #1;
        g_line = lines[(g_laddr - 32'h1000) / 128];
        #1;
        checks++;
        if (g_rval !== dequant(qv[i], int'(g_lsb))) begin
          failures++;
          if (failures < 10) $display("FAIL gpu read p=%0d i=%0d got %h exp %h", p, i, g_rval, dequant(qv[i], int'(g_lsb)));
        end
      end
    end
  endtask

  int xq [N_IN][$];                  // current layer inputs (P-bit integers)
  int wq [N_NFU][NL][$];             // weights per NFU, entries back to back
  int yq [N_NFU][N_OUT][$];          // quantised outputs per NFU

  initial begin
    int pi, li, si, pw, lw, sw, po, lo, so, K, E, nrows_sb, cyc, in_rows, prev_p;
    int sb_base, out_base, out_stride, in_addr, n_layers;
    logic [15:0] cw [N_IN][$];
    logic [15:0] care [$];
    logic [15:0] ow [N_OUT][$];
    logic [15:0] ocare [$];
    cmd_t c;
    void'($urandom(SEED));
    ext_we = 0; ext_re = 0; ext_addr = '0; ext_wdata = '0; sb_we = 0; sb_nfu = '0;
    sb_waddr = '0; sb_wdata = '0; cmd_valid = 0; cmd = '0; cfg = '0;
    g_base = '0; g_idx = '0; g_p = 5'd16; g_lsb = '0; g_line = '0; g_wval = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev_p = 0;
    in_addr = 0;
    gpu_check();
    for (int net = 0; net < (WORKLOADS ? 5 : 1); net++) begin
    n_layers = WORKLOADS ? net_layers(net) : LAYERS;
    for (int layer = 0; layer < n_layers; layer++) begin
      if (WORKLOADS) begin
        if (layer == 0) begin
          pi = net_data_p(net, 0); li = (pi < 10) ? 10 - pi : 0; si = 3;
        end else begin
          pi = po; li = lo; si = so;
        end
        K = E1; E = E1;
        pw = net_weight_p(net); lw = (pw < 8) ? 8 - pw : 0; sw = 2;
        po = net_data_p(net, (layer + 1 < n_layers) ? layer + 1 : layer);
        lo = (po < 10) ? 10 - po : 0; so = 2;
      end else begin
        // layer-1 precisions in the range the networks need; layer 2 differs
        if (layer == 0) begin
          pi = 10; li = 0; si = 3;        // 3-deep streams as in a first layer
          K = K1; E = E1;
        end else begin
          pi = po; li = lo; si = so;      // previous layer's stored output
          K = E1; E = E2;
        end
        pw = (layer == 0) ? 9 : 7;  lw = (layer == 0) ? 0 : 2; sw = (layer == 0) ? 4 : 0;
        po = (layer == 0) ? 11 : 5; lo = (layer == 0) ? 2 : 9; so = (layer == 0) ? 5 : 0;
      end
      if (layer > 0 && pi != prev_p) n_switch++;
      prev_p = pi;
      cfg.data_in = mk(pi, li, si); cfg.weight = mk(pw, lw, sw); cfg.data_out = mk(po, lo, so);
      out_base = (layer % 2 == 0) ? EDRAM_DEPTH / 4 : EDRAM_DEPTH / 2;
      out_stride = 16;
      sb_base = (layer == 0) ? 0 : SB_DEPTH / 2;
      // inputs
      if (layer == 0) begin
        for (int i = 0; i < N_IN; i++) begin
          xq[i].delete();
          for (int k = 0; k < K; k++) xq[i].push_back(rand_q(pi));
          pack_column(xq[i], pi, si, cw[i], care);
        end
        in_rows = cw[0].size();
        for (int r = 0; r < in_rows; r++) begin
          @(negedge clk); ext_we = 1; ext_addr = E_AW'(r);
          for (int i = 0; i < N_IN; i++) ext_wdata[i*16 +: 16] = cw[i][r];
        end
        @(negedge clk); ext_we = 0;
        c = '0; c.op = OP_LOAD_NBIN; c.edram_addr = 17'(0); c.count = CNT_W'(in_rows);
      end else begin
        // NFU 0's previous outputs become this layer's inputs
        for (int i = 0; i < N_IN; i++) begin
          xq[i].delete();
          for (int k = 0; k < K; k++) xq[i].push_back(yq[0][i][k]);
          pack_column(xq[i], pi, si, cw[i], care);
        end
        in_rows = cw[0].size();
        c = '0; c.op = OP_LOAD_NBIN; c.edram_addr = 17'(in_addr); c.count = CNT_W'(in_rows);
      end
      for (int k = 0; k < K; k++) for (int i = 0; i < N_IN; i++)
        if (((k * pi) % 16) + pi > 16) n_straddle++;
      run_cmd(c, cyc);
      // weights
      nrows_sb = 0;
      for (int n = 0; n < N_NFU; n++) begin
        for (int j = 0; j < NL; j++) begin
          wq[n][j].delete();
          for (int e = 0; e < E; e++) for (int k = 0; k < K; k++) wq[n][j].push_back(rand_q(pw));
        end
        for (int e = 0; e < E; e++) begin
          logic [15:0] tmp [NL][$];
          int seg [$];
          for (int j = 0; j < NL; j++) begin
            seg.delete();
            for (int k = 0; k < K; k++) seg.push_back(wq[n][j][e*K + k]);
            pack_column(seg, pw, sw, tmp[j], care);
          end
          nrows_sb = tmp[0].size();
          for (int r = 0; r < nrows_sb; r++) begin
            @(negedge clk); sb_we = 1; sb_nfu = NFU_AW'(n); sb_waddr = SB_AW'(sb_base + e * nrows_sb + r);
            for (int j = 0; j < NL; j++) sb_wdata[j*16 +: 16] = tmp[j][r];
          end
        end
      end
      @(negedge clk); sb_we = 0;
      // model
      for (int n = 0; n < N_NFU; n++) begin
        for (int o = 0; o < N_OUT; o++) yq[n][o].delete();
        for (int e = 0; e < E; e++) begin
          for (int o = 0; o < N_OUT; o++) begin
            longint s, y;
            s = 0;
            for (int k = 0; k < K; k++)
              for (int i = 0; i < N_IN; i++)
                s += longint'($signed(dequant(xq[i][k], li))) *
                     longint'($signed(dequant(wq[n][o*N_IN+i][e*K+k], lw)));
            y = s >>> 8;
            if (y > 32767) y = 32767;
            if (y < -32768) y = -32768;
            if (e % 2 == 1) begin
              y = (y * 256 + s) >>> 8;
              if (y > 32767) y = 32767;
              if (y < -32768) y = -32768;
            end
            yq[n][o].push_back(quant(int'(y), po, lo));
            if ((y >>> lo) >= (1 << (po - 1)) || (y >>> lo) < -(1 << (po - 1))) n_sat++;
          end
        end
      end
      // compute
      for (int e = 0; e < E; e++) begin
        for (int pass = 0; pass < 1 + (e % 2); pass++) begin
          c = '0; c.op = OP_COMPUTE; c.count = CNT_W'(K); c.nbin_addr = '0;
          c.sb_addr = 12'(sb_base + e * nrows_sb); c.nbout_addr = 6'(e); c.accumulate = (pass == 1);
          if (pass == 1) n_accum++;
          run_cmd(c, cyc);
          checks++;
          if (cyc != K + 7) begin failures++; $display("FAIL compute cycles %0d exp %0d", cyc, K + 7); end
        end
      end
      // store and compare
      c = '0; c.op = OP_STORE; c.count = CNT_W'(E); c.nbout_addr = '0;
      c.edram_addr = 17'(out_base); c.edram_stride = 17'(out_stride);
      run_cmd(c, cyc);
      for (int n = 0; n < N_NFU; n++) begin
        for (int o = 0; o < N_OUT; o++) pack_column(yq[n][o], po, so, ow[o], ocare);
        for (int r = 0; r < ow[0].size(); r++) begin
          @(negedge clk); ext_re = 1; ext_addr = E_AW'(out_base + n * out_stride + r);
          @(negedge clk); ext_re = 0;
          for (int o = 0; o < N_OUT; o++) begin
            checks++;
            if (((ext_rdata[o*16 +: 16] ^ ow[o][r]) & ocare[r]) != 0) begin
              failures++;
              if (failures < 10) $display("FAIL layer %0d nfu %0d row %0d col %0d got %h exp %h care %h",
                                          layer, n, r, o, ext_rdata[o*16 +: 16], ow[o][r], ocare[r]);
            end
          end
        end
      end
      $display("%s layer %0d: P in/w/out %0d/%0d/%0d, %0d values x %0d entries, %0d NFUs checked",
               WORKLOADS ? net_name(net) : "test", layer + 1, pi, pw, po, K, E, N_NFU);
      in_addr = out_base;
    end
    end
    $display("realign %0d flush %0d accumulate %0d saturate %0d straddle %0d precision-switch %0d gpu-padded-lines %0d gpu-grouped-precision %0d",
             n_realign, n_flush, n_accum, n_sat, n_straddle, n_switch, n_gpu_pad, n_gpu_group);
    if (n_realign == 0) failures++;
    if (n_flush == 0) failures++;
    if (n_accum == 0) failures++;
    if (!WORKLOADS && n_sat == 0) failures++;
    if (n_gpu_pad == 0 || n_gpu_group == 0) failures++;
    if (n_straddle == 0) failures++;
    if (LAYERS > 1 && n_switch == 0) failures++;
    finished = 1'b1;
  end
endmodule
