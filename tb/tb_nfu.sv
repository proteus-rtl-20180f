// tb_nfu: end-to-end check of one NFU at a reduced size (4 inputs, 4
// outputs, 16 SB lanes). Input data and weights are packed by a reference
// model with random per-layer precisions, exponents and stream lengths and
// written to NBin and SB. E output entries are computed, some of them in a
// second pass that accumulates onto the NBout partial sum, and then packed
// to the output precision. Every packed row is compared with the model on
// the bits that carry values; the compute latency (K + 4 cycles after the
// start cycle) is checked, and re-alignments, flushes, accumulation passes
// and output saturation must each occur.
module tb_nfu;
  import proteus_pkg::*;
  import tb_model_pkg::*;

  localparam int NI = 4, NO = 4, NL = NI * NO;
  logic clk = 1'b0, rst_n = 1'b0;
  layer_cfg_t cfg;
  logic nbin_we, sb_we, cstart, caccum, cbusy, cdone, pstart, pbusy, ovalid, pdone, realign, flush;
  logic [5:0] nbin_waddr, cin_base, cacc, pbase;
  logic [NI*16-1:0] nbin_wdata;
  logic [6:0] sb_waddr, cw_base;
  logic [NL*16-1:0] sb_wdata;
  logic [CNT_W-1:0] ccount, pcount;
  logic [NO*16-1:0] odata;
  int checks = 0, failures = 0;
  int n_realign = 0, n_flush = 0, n_accum = 0, n_sat = 0;

  nfu #(.N_IN(NI), .N_OUT(NO), .NBIN_DEPTH(64), .NBOUT_DEPTH(64), .SB_DEPTH(128)) dut (
    .clk, .rst_n, .cfg_i(cfg),
    .nbin_we_i(nbin_we), .nbin_waddr_i(nbin_waddr), .nbin_wdata_i(nbin_wdata),
    .sb_we_i(sb_we), .sb_waddr_i(sb_waddr), .sb_wdata_i(sb_wdata),
    .comp_start_i(cstart), .comp_count_i(ccount), .comp_in_base_i(cin_base),
    .comp_w_base_i(cw_base), .comp_acc_addr_i(cacc), .comp_accumulate_i(caccum),
    .comp_busy_o(cbusy), .comp_done_o(cdone),
    .pack_start_i(pstart), .pack_count_i(pcount), .pack_base_i(pbase), .pack_busy_o(pbusy),
    .out_valid_o(ovalid), .out_data_o(odata), .pack_done_o(pdone),
    .realign_o(realign), .flush_o(flush));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (realign) n_realign++;
    if (flush) n_flush++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic repr_t mk(input int p, input int lsb, input int sl);
    repr_t r;
    r.p = 5'(p); r.lsb = 4'(lsb); r.stream_len = CNT_W'(sl);
    return r;
  endfunction

  initial begin
    int pi, li, si, pw, lw, sw, po, lo, so, K, E, nrows_sb, cyc;
    int xq [NI][$];
    int wq [NL][$];
    int yq [NO][$];
    longint y [NO];
    logic [15:0] cw [NL][$];
    logic [15:0] care [$];
    logic [15:0] ocare [$];
    logic [15:0] ow [NO][$];
    int nw;
    nbin_we = 0; sb_we = 0; cstart = 0; pstart = 0; caccum = 0;
    nbin_waddr = '0; nbin_wdata = '0; sb_waddr = '0; sb_wdata = '0;
    ccount = '0; pcount = '0; cin_base = '0; cw_base = '0; cacc = '0; pbase = '0; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      pi = 2 + $urandom() % 15; li = $urandom() % (17 - pi); si = (t % 2) ? 0 : 1 + $urandom() % 5;
      pw = 2 + $urandom() % 15; lw = $urandom() % (17 - pw); sw = $urandom() % 4;
      po = 2 + $urandom() % 15; lo = 4 + $urandom() % (13 - (po > 12 ? 12 : po));
      if (lo + po > 16) lo = 16 - po;
      so = $urandom() % 4;
      K  = 1 + $urandom() % 12;
      E  = 1 + $urandom() % 6;
      cfg.data_in = mk(pi, li, si); cfg.weight = mk(pw, lw, sw); cfg.data_out = mk(po, lo, so);
      // input data: one stream per NBin column
      for (int i = 0; i < NI; i++) begin
        xq[i].delete();
        for (int k = 0; k < K; k++) xq[i].push_back(rand_q(pi));
        pack_column(xq[i], pi, si, cw[i], care);
      end
      for (int r = 0; r < cw[0].size(); r++) begin
        @(negedge clk); nbin_we = 1; nbin_waddr = 6'(r);
        for (int i = 0; i < NI; i++) nbin_wdata[i*16 +: 16] = cw[i][r];
      end
      @(negedge clk); nbin_we = 0;
      // weights: K values per lane for each entry, packed back to back
      for (int j = 0; j < NL; j++) begin
        wq[j].delete();
        for (int e = 0; e < E; e++) for (int k = 0; k < K; k++) wq[j].push_back(rand_q(pw));
      end
      // each entry's stream starts aligned: pack entry by entry
      nrows_sb = 0;
      for (int e = 0; e < E; e++) begin
        logic [15:0] tmp [NL][$];
        int seg [$];
        for (int j = 0; j < NL; j++) begin
          seg.delete();
          for (int k = 0; k < K; k++) seg.push_back(wq[j][e*K + k]);
          pack_column(seg, pw, sw, tmp[j], care);
        end
        if (e == 0) nrows_sb = tmp[0].size();
        for (int r = 0; r < tmp[0].size(); r++) begin
          @(negedge clk); sb_we = 1; sb_waddr = 7'(e * nrows_sb + r);
          for (int j = 0; j < NL; j++) sb_wdata[j*16 +: 16] = tmp[j][r];
        end
      end
      @(negedge clk); sb_we = 0;
      // compute each entry; odd entries get a second, accumulating pass
      for (int o = 0; o < NO; o++) yq[o].delete();
      for (int e = 0; e < E; e++) begin
        for (int o = 0; o < NO; o++) begin
          longint s;
          s = 0;
          for (int k = 0; k < K; k++)
            for (int i = 0; i < NI; i++)
              s += longint'($signed(dequant(xq[i][k], li))) * longint'($signed(dequant(wq[o*NI+i][e*K+k], lw)));
          y[o] = s >>> 8;
          if (y[o] > 32767) y[o] = 32767;
          if (y[o] < -32768) y[o] = -32768;
          if (e % 2 == 1) begin
            y[o] = (y[o] * 256 + s) >>> 8;
            if (y[o] > 32767) y[o] = 32767;
            if (y[o] < -32768) y[o] = -32768;
          end
          yq[o].push_back(quant(int'(y[o]), po, lo));
          if ((y[o] >>> lo) > (1 << (po - 1)) || (y[o] >>> lo) < -(1 << (po - 1))) n_sat++;
        end
        for (int pass = 0; pass < 1 + (e % 2); pass++) begin
          @(negedge clk);
          cstart = 1; ccount = CNT_W'(K); cin_base = '0; cw_base = 7'(e * nrows_sb);
          cacc = 6'(e); caccum = (pass == 1);
          if (pass == 1) n_accum++;
          @(negedge clk); cstart = 0;
          cyc = 0;
          while (!cdone && cyc < 100) begin @(negedge clk); cyc++; end
          checks++;
          if (cyc != K + 4) begin failures++; $display("FAIL compute latency %0d exp %0d", cyc, K + 4); end
        end
      end
      // pack and compare
      for (int o = 0; o < NO; o++) pack_column(yq[o], po, so, ow[o], ocare);
      @(negedge clk);
      pstart = 1; pcount = CNT_W'(E); pbase = '0;
      @(negedge clk); pstart = 0;
      nw = 0; cyc = 0;
      while (cyc < 200) begin
        if (ovalid) begin
          for (int o = 0; o < NO; o++) begin
            checks++;
            if (nw >= ow[o].size() || ((odata[o*16 +: 16] ^ ow[o][nw]) & ocare[nw]) != 0) begin
              failures++;
              if (failures < 10) $display("FAIL t=%0d K=%0d E=%0d pi=%0d li=%0d si=%0d pw=%0d lw=%0d sw=%0d po=%0d lo=%0d so=%0d row %0d col %0d got %h exp %h care %h", t, K, E, pi, li, si, pw, lw, sw, po, lo, so,
                                          nw, o, odata[o*16 +: 16], ow[o][nw], ocare[nw]);
            end
          end
          nw++;
        end
        if (pdone) break;
        @(negedge clk); cyc++;
      end
      checks++;
      if (nw != ow[0].size()) begin failures++; $display("FAIL rows %0d exp %0d", nw, ow[0].size()); end
      @(negedge clk);
    end
    $display("realign %0d flush %0d accumulate %0d saturate %0d", n_realign, n_flush, n_accum, n_sat);
    if (n_realign == 0 || n_flush == 0 || n_accum == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
