// tb_unpacker: checks the unpacker against a bit-level model. For random
// precisions P, exponent positions and register positions (including values
// that wrap from bit 31 to bit 0), it places a random P-bit value in the
// 32-bit unpacking register through the two half loads, applies the rotate
// amount and masks, and compares the native output with the value
// sign-extended and shifted to its LSB position.
module tb_unpacker;
  import proteus_pkg::*;
  import tb_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  word_t word, keep, above, msb, value;
  logic ld_lo, ld_hi;
  logic [ROT_W-1:0] rot;
  int checks = 0, failures = 0, wraps = 0;

  unpacker dut (.clk, .rst_n, .word_i(word), .load_lo_i(ld_lo), .load_hi_i(ld_hi),
                .rot_i(rot), .keep_i(keep), .above_i(above), .msb_i(msb), .value_o(value));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int p, lsb, s, q;
    ld_lo = 0; ld_hi = 0; word = '0; rot = '0; keep = '0; above = '0; msb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      p   = 1 + ($urandom() % 16);
      lsb = $urandom() % (17 - p);
      s   = $urandom() % 32;
      q   = rand_q(p);
      r   = $urandom();
      for (int b = 0; b < p; b++) r[(s + b) % 32] = q[b];
      if (s + p > 32) wraps++;
      // load both halves over two cycles
      @(negedge clk); word = r[15:0];  ld_lo = 1; ld_hi = 0;
      @(negedge clk); word = r[31:16]; ld_lo = 0; ld_hi = 1;
      @(negedge clk); ld_hi = 0; word = $urandom();
      rot = ROT_W'((s - lsb + 32) % 32);
      keep = '0; above = '0; msb = '0;
      for (int b = 0; b < 16; b++) begin
        if (b >= lsb && b < lsb + p) keep[b] = 1'b1;
        if (b >= lsb + p)            above[b] = 1'b1;
        if (b == lsb + p - 1)        msb[b] = 1'b1;
      end
      #1;
      checks++;
      if (value !== dequant(q, lsb)) begin
        failures++;
        if (failures < 10)
          $display("FAIL p=%0d lsb=%0d s=%0d q=%0d got %h exp %h", p, lsb, s, q, value, dequant(q, lsb));
      end
    end
    if (wraps == 0) failures++;
    $display("wrap-around cases: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
