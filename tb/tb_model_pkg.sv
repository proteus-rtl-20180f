// tb_model_pkg: reference models for the Proteus testbenches, written
// independently of the RTL: quantisation of native values to a P-bit
// storage format, and the packed layout of one virtual column.
package tb_model_pkg;

  // Round a native 16-bit value to P bits with its LSB at native bit lsb:
  // round to nearest (ties upward), then saturate. Returns the P-bit integer.
  function automatic int quant(input int x, input int p, input int lsb);
    longint r, lo, hi;
    if (lsb > 0) r = (longint'(x) + (longint'(1) << (lsb - 1))) >>> lsb;
    else         r = x;
    lo = -(longint'(1) << (p - 1));
    hi = (longint'(1) << (p - 1)) - 1;
    if (r < lo) r = lo;
    if (r > hi) r = hi;
    return int'(r);
  endfunction

  // Native 16-bit word for a P-bit integer q stored with LSB at bit lsb.
  function automatic logic [15:0] dequant(input int q, input int lsb);
    int v;
    v = q <<< lsb;
    return v[15:0];
  endfunction

  // Sign-extend the low p bits of v.
  function automatic int sext(input int v, input int p);
    int s;
    s = v & ((1 << p) - 1);
    if (s >= (1 << (p - 1))) s = s - (1 << p);
    return s;
  endfunction

  // Pack P-bit values of one virtual column, LSB first; a new stream starts
  // on a fresh word every stream_len values (0 = never), and the last word is
  // padded. care[] marks the bits that hold value bits.
  function automatic void pack_column(input int vals[$], input int p, input int stream_len,
                                      ref logic [15:0] words[$], ref logic [15:0] care[$]);
    int bitpos;
    words.delete();
    care.delete();
    bitpos = 0;
    foreach (vals[k]) begin
      for (int b = 0; b < p; b++) begin
        int w;
        w = (bitpos + b) / 16;
        while (words.size() <= w) begin
          words.push_back('0);
          care.push_back('0);
        end
        words[w][(bitpos + b) % 16] = vals[k][b];
        care[w][(bitpos + b) % 16]  = 1'b1;
      end
      bitpos += p;
      if (stream_len > 0 && ((k + 1) % stream_len) == 0 && (bitpos % 16) != 0)
        bitpos += 16 - (bitpos % 16);
    end
  endfunction

  // Random P-bit integer.
  function automatic int rand_q(input int p);
    return sext(int'($urandom()), p);
  endfunction

endpackage
