// tb_packer: checks the packer against a model. For random native values,
// precisions, exponent positions and register positions it compares the
// rounded and saturated P-bit field written into the packing register, and
// that every other register bit is left unchanged, by reading both halves
// through the output multiplexer. Saturation in both directions and
// rounding are counted and must each occur.
module tb_packer;
  import proteus_pkg::*;
  import tb_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  word_t value, half, keep, msb, high, wout;
  logic load, sel;
  logic [ROT_W-1:0] rot;
  reg_t en;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, rounded_up = 0;

  packer dut (.clk, .rst_n, .value_i(value), .load_i(load), .half_i(half), .keep_i(keep),
              .msb_i(msb), .high_i(high), .rot_i(rot), .en_i(en), .sel_i(sel), .word_o(wout));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    int p, lsb, pos, x, q;
    load = 0; sel = 0; value = '0; rot = '0; en = '0;
    half = '0; keep = '0; msb = '0; high = '0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      p   = 1 + ($urandom() % 16);
      lsb = $urandom() % (17 - p);
      pos = $urandom() % 32;
      x   = sext($urandom(), 16);
      if (t % 7 == 0) x = (t % 2) ? 32767 : -32768;
      q   = quant(x, p, lsb);
      if (q == (1 << (p - 1)) - 1 && (x >>> lsb) > q) sat_hi++;
      if (q == -(1 << (p - 1)) && (x >>> lsb) < q) sat_lo++;
      if (lsb > 0 && q == (x >>> lsb) + 1) rounded_up++;
      @(negedge clk);
      value = x[15:0];
      half = '0; keep = '0; msb = '0; high = '0; en = '0;
      if (lsb > 0) half[lsb - 1] = 1'b1;
      for (int b = 0; b < 16; b++) begin
        if (b >= lsb && b < lsb + p) keep[b] = 1'b1;
        if (b == lsb + p - 1)        msb[b] = 1'b1;
        if (b >= lsb + p - 1)        high[b] = 1'b1;
      end
      for (int b = 0; b < p; b++) begin
        en[(pos + b) % 32] = 1'b1;
        model[(pos + b) % 32] = q[b];
      end
      rot = ROT_W'((lsb - pos + 32) % 32);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int h = 0; h < 2; h++) begin
        sel = h[0];
        #1;
        checks++;
        if (wout !== model[16*h +: 16]) begin
          failures++;
          if (failures < 10)
            $display("FAIL p=%0d lsb=%0d pos=%0d x=%0d q=%0d half%0d got %h exp %h",
                     p, lsb, pos, x, q, h, wout, model[16*h +: 16]);
        end
      end
    end
    $display("saturate high %0d, low %0d, rounded up %0d", sat_hi, sat_lo, rounded_up);
    if (sat_hi == 0 || sat_lo == 0 || rounded_up == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
