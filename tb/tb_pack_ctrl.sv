// tb_pack_ctrl: checks the packer control block together with a two-column
// NBout-like buffer and two packers. Random native values are stored, then
// packed with random precision, exponent and stream length. Each emitted
// word is compared, on the bits that hold value bits, with a reference
// packing of the rounded and saturated values; the number of words, the
// number of flushes and the cycle of done_o (count + flushes + 2 cycles after
// start) are checked too.
module tb_pack_ctrl;
  import proteus_pkg::*;
  import tb_model_pkg::*;

  localparam int COLS = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we, start, busy, re, load, sel, wvalid, done, flush;
  logic [5:0] waddr, raddr, base;
  logic [COLS*16-1:0] wdata, rdata;
  repr_t repr;
  logic [CNT_W-1:0] count;
  logic [ROT_W-1:0] rot;
  word_t half, keep, msb, high;
  reg_t en;
  word_t wout [COLS];
  int checks = 0, failures = 0, flushes_total = 0;

  buffer_mem #(.WIDTH(COLS*16), .DEPTH(64)) u_buf (
    .clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .rd_en_i(re), .raddr_i(raddr), .rd_data_o(rdata));
  pack_ctrl #(.ADDR_W(6)) dut (
    .clk, .rst_n, .start_i(start), .repr_i(repr), .base_i(base), .count_i(count), .busy_o(busy),
    .rd_en_o(re), .rd_addr_o(raddr), .load_o(load), .half_o(half), .keep_o(keep), .msb_o(msb),
    .high_o(high), .rot_o(rot), .en_o(en), .sel_o(sel), .wvalid_o(wvalid), .done_o(done),
    .flush_o(flush));
  for (genvar c = 0; c < COLS; c++) begin : g_p
    packer u (.clk, .rst_n, .value_i(rdata[c*16 +: 16]), .load_i(load), .half_i(half),
              .keep_i(keep), .msb_i(msb), .high_i(high), .rot_i(rot), .en_i(en), .sel_i(sel),
              .word_o(wout[c]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, lsb, sl, n, b0, nflush, bitpos, cyc, nw, done_cyc, flushes;
    int xs [COLS][$];
    int qs [COLS][$];
    logic [15:0] words [COLS][$];
    logic [15:0] care [$];
    we = 0; start = 0; waddr = '0; wdata = '0; base = '0; count = '0; repr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      p   = 1 + ($urandom() % 16);
      if (t < 16) p = t + 1;
      lsb = $urandom() % (17 - p);
      sl  = ($urandom() % 3 == 0) ? 0 : 1 + ($urandom() % 9);
      n   = 1 + ($urandom() % 40);
      b0  = $urandom() % 20;
      for (int c = 0; c < COLS; c++) begin
        xs[c].delete(); qs[c].delete();
        for (int k = 0; k < n; k++) begin
          int x;
          x = sext($urandom(), 16) >>> ($urandom() % 12);
          xs[c].push_back(x);
          qs[c].push_back(quant(x, p, lsb));
        end
        pack_column(qs[c], p, sl, words[c], care);
      end
      nflush = 0; bitpos = 0;
      for (int k = 0; k < n; k++) begin
        bitpos += p;
        if (((sl > 0 && (k + 1) % sl == 0) || k == n - 1) && bitpos % 16 != 0) begin
          nflush++;
          bitpos += 16 - bitpos % 16;
        end
      end
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        we = 1; waddr = 6'(b0 + k);
        for (int c = 0; c < COLS; c++) wdata[c*16 +: 16] = xs[c][k][15:0];
      end
      @(negedge clk); we = 0;
      repr.p = 5'(p); repr.lsb = 4'(lsb); repr.stream_len = CNT_W'(sl);
      base = 6'(b0); count = CNT_W'(n);
      start = 1;
      nw = 0; cyc = 0; done_cyc = -1; flushes = 0;
      @(negedge clk); start = 0;
      while (done_cyc < 0 && cyc < 200) begin
        if (wvalid) begin
          for (int c = 0; c < COLS; c++) begin
            checks++;
            if (nw >= words[c].size() || ((wout[c] ^ words[c][nw]) & care[nw]) != 0) begin
              failures++;
              if (failures < 10)
                $display("FAIL t=%0d p=%0d lsb=%0d sl=%0d word %0d col %0d got %h exp %h care %h",
                         t, p, lsb, sl, nw, c, wout[c], words[c][nw], care[nw]);
            end
          end
          nw++;
        end
        if (flush) flushes++;
        if (done) done_cyc = cyc;
        @(negedge clk);
        cyc++;
      end
      checks += 3;
      if (nw != words[0].size()) begin failures++; $display("FAIL words %0d exp %0d", nw, words[0].size()); end
      if (flushes != nflush) begin failures++; $display("FAIL flushes %0d exp %0d", flushes, nflush); end
      // start sampled at cycle 0's opening edge: done n + flushes + 1 cycles later
      if (done_cyc != n + nflush + 1) begin
        failures++; $display("FAIL done at %0d exp %0d", done_cyc, n + nflush + 1);
      end
      flushes_total += nflush;
    end
    $display("flushes %0d", flushes_total);
    if (flushes_total == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
