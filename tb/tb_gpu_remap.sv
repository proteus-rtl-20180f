// tb_gpu_remap: checks the GPU address remapping against a model: line
// address and bit offset of random elements for every precision (slot
// widths 16, 10 and 8 for the groups 11-16, 9-10 and 7-8), that no slot
// crosses a line, read extraction from a random line, and the write data
// and mask of a rounded, saturated store.
module tb_gpu_remap;
  import proteus_pkg::*;
  import tb_model_pkg::*;
  localparam int LB = 1024;
  logic [31:0] base, laddr;
  logic [23:0] idx;
  logic [4:0] p, peff;
  logic [3:0] lsb;
  logic [9:0] off;
  logic [LB-1:0] line, wdata, wmask;
  word_t rval, wval;
  int checks = 0, failures = 0, padded = 0;

  gpu_remap dut (.base_i(base), .index_i(idx), .p_i(p), .lsb_i(lsb), .p_eff_o(peff),
                 .line_addr_o(laddr), .bit_off_o(off), .line_i(line), .rvalue_o(rval),
                 .wvalue_i(wval), .wdata_o(wdata), .wmask_o(wmask));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pe, per, li, sl, q, x, qw;
    logic [LB-1:0] ed, em;
    for (int t = 0; t < 3000; t++) begin
      p    = 5'(1 + $urandom() % 16);
      lsb  = 4'($urandom() % (17 - p));
      base = {$urandom() % 65536, 7'b0};
      idx  = 24'($urandom() % 100000);
      for (int w = 0; w < LB / 32; w++) line[w*32 +: 32] = $urandom();
      x = sext($urandom(), 16) >>> ($urandom() % 10);
      wval = x[15:0];
      pe  = (p >= 11) ? 16 : (p >= 9) ? 10 : (p >= 7) ? 8 : int'(p);
      per = LB / pe;
      li  = int'(idx) / per;
      sl  = int'(idx) % per;
      if (per * pe != LB) padded++;
      #1;
      checks += 4;
      if (peff != 5'(pe)) begin failures++; $display("FAIL peff p=%0d got %0d", p, peff); end
      if (laddr != base + 32'(li * (LB / 8))) begin failures++; $display("FAIL addr"); end
      if (off != 10'(sl * pe) || sl * pe + pe > LB) begin failures++; $display("FAIL off"); end
      q = 0;
      for (int b = 0; b < p; b++) q[b] = line[sl * pe + b];
      q = sext(q, p);
      if (rval !== dequant(q, lsb)) begin
        failures++;
        if (failures < 10) $display("FAIL read p=%0d lsb=%0d got %h exp %h", p, lsb, rval, dequant(q, lsb));
      end
      qw = quant(x, p, lsb);
      ed = '0; em = '0;
      for (int b = 0; b < p; b++) begin ed[sl * pe + b] = qw[b]; em[sl * pe + b] = 1'b1; end
      checks++;
      if (wmask !== em || wdata !== ed) begin
        failures++;
        if (failures < 10) $display("FAIL write p=%0d lsb=%0d x=%0d", p, lsb, x);
      end
    end
    if (padded == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
