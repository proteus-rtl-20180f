// tb_unpack_ctrl: checks the unpacker control block together with a
// two-column buffer and two unpackers. Random streams of P-bit values are
// packed by a reference model (with re-alignment every stream_len values),
// written to the buffer, and read back through the controller. The test
// checks every value, that the values come out one per cycle starting three
// cycles after start, that last_o marks the final one, and that the number
// of re-alignments and buffer reads match the model.
module tb_unpack_ctrl;
  import proteus_pkg::*;
  import tb_model_pkg::*;

  localparam int COLS = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we, start, busy, re, ldlo, ldhi, valid, last, realign;
  logic [5:0] waddr, raddr, base;
  logic [COLS*16-1:0] wdata, rdata;
  repr_t repr;
  logic [CNT_W-1:0] count;
  logic [ROT_W-1:0] rot;
  word_t keep, above, msb;
  word_t value [COLS];
  int checks = 0, failures = 0, realigns = 0, exp_realigns_total = 0, straddles = 0;

  buffer_mem #(.WIDTH(COLS*16), .DEPTH(64)) u_buf (
    .clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .rd_en_i(re), .raddr_i(raddr), .rd_data_o(rdata));
  unpack_ctrl #(.ADDR_W(6)) dut (
    .clk, .rst_n, .start_i(start), .repr_i(repr), .base_i(base), .count_i(count), .busy_o(busy),
    .rd_en_o(re), .rd_addr_o(raddr), .load_lo_o(ldlo), .load_hi_o(ldhi), .rot_o(rot),
    .keep_o(keep), .above_o(above), .msb_o(msb), .valid_o(valid), .last_o(last), .realign_o(realign));
  for (genvar c = 0; c < COLS; c++) begin : g_u
    unpacker u (.clk, .rst_n, .word_i(rdata[c*16 +: 16]), .load_lo_i(ldlo), .load_hi_i(ldhi),
                .rot_i(rot), .keep_i(keep), .above_i(above), .msb_i(msb), .value_o(value[c]));
  end

  always #5 clk = ~clk;

  int reads;
  always @(posedge clk) begin
    if (realign) realigns++;
    if (re) reads++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, lsb, sl, n, b0, exp_realign, bitpos;
    int vals [COLS][$];
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
      b0  = $urandom() % 8;
      // model
      for (int c = 0; c < COLS; c++) begin
        vals[c].delete();
        for (int k = 0; k < n; k++) vals[c].push_back(rand_q(p));
        pack_column(vals[c], p, sl, words[c], care);
      end
      exp_realign = 0; bitpos = 0;
      for (int k = 0; k < n; k++) begin
        if ((bitpos % 16) + p > 16) straddles++;
        bitpos += p;
        if (sl > 0 && (k + 1) % sl == 0 && bitpos % 16 != 0) begin
          exp_realign++;
          bitpos += 16 - bitpos % 16;
        end
      end
      // fill the buffer
      for (int r = 0; r < words[0].size(); r++) begin
        @(negedge clk);
        we = 1; waddr = 6'(b0 + r);
        for (int c = 0; c < COLS; c++) wdata[c*16 +: 16] = words[c][r];
      end
      @(negedge clk); we = 0;
      repr.p = 5'(p); repr.lsb = 4'(lsb); repr.stream_len = CNT_W'(sl);
      base = 6'(b0); count = CNT_W'(n);
      realigns = 0; reads = 0;
      start = 1;
      @(negedge clk); start = 0;
      // start sampled at the last edge; value 0 valid two cycles later
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL early valid"); end
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        checks++;
        if (!valid || (last != (k == n - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL timing t=%0d k=%0d valid=%b last=%b", t, k, valid, last);
        end
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (value[c] !== dequant(vals[c][k], lsb)) begin
            failures++;
            if (failures < 10)
              $display("FAIL t=%0d p=%0d lsb=%0d sl=%0d k=%0d c=%0d got %h exp %h",
                       t, p, lsb, sl, k, c, value[c], dequant(vals[c][k], lsb));
          end
        end
      end
      @(negedge clk);
      checks += 3;
      if (valid || busy) failures++;
      if (realigns != exp_realign) begin
        failures++; $display("FAIL realigns %0d exp %0d", realigns, exp_realign);
      end
      if (reads != words[0].size()) begin
        failures++; $display("FAIL reads %0d exp %0d", reads, words[0].size());
      end
      exp_realigns_total += exp_realign;
    end
    $display("realignments %0d, straddling values %0d", exp_realigns_total, straddles);
    if (exp_realigns_total == 0 || straddles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
