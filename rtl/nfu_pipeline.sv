// nfu_pipeline: the NFU's compute pipeline in the native 16-bit fixed-point
// format (the part the translation layer converts to and from).
//
// Each cycle it takes N_IN input values and N_OUT x N_IN weights (256
// lanes for the document's 16 x 16) and adds, for every output o, the inner
// product sum_i x[i] * w[o*N_IN + i] into an accumulator. Partial sums are
// kept in NBout in native precision and fed back: init_i loads the
// accumulators with init_val_i (an NBout entry, or zero) before a pass.
// After the value marked last_i, the accumulators are converted back to the
// native format and presented on res_o with res_valid_o.
//
// Stages: multiply (registered), adder tree per output (registered),
// accumulate; res_valid_o follows last_i by three cycles. The native format
// (8 fractional bits), the wide accumulator, truncating conversion with
// saturation and the stage split are this design's choices: the document
// names a 256-wide SIMD pipeline but leaves its insides to the base
// accelerator.
module nfu_pipeline
  import proteus_pkg::*;
#(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned N_OUT = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init_i,
  input  word_t init_val_i [N_OUT],
  input  logic  valid_i,
  input  logic  last_i,
  input  word_t x_i [N_IN],
  input  word_t w_i [N_OUT*N_IN],
  output logic  res_valid_o,
  output word_t res_o [N_OUT]
);

  localparam int unsigned PROD_W = 2 * NATIVE_W;
  localparam int unsigned SUM_W  = PROD_W + $clog2(N_IN) + 1;
  localparam int unsigned ACC_W  = SUM_W + 8;

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [SUM_W-1:0]  sum_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  prod_t prod_q [N_OUT*N_IN];
  sum_t  sum_q  [N_OUT];
  acc_t  acc_q  [N_OUT];
  logic  v1_q, l1_q, v2_q, l2_q, done_q;

  // Stage 1: products.
  always_ff @(posedge clk) begin
    for (int o = 0; o < int'(N_OUT); o++)
      for (int i = 0; i < int'(N_IN); i++)
        prod_q[o*N_IN+i] <= prod_t'($signed(x_i[i]) * $signed(w_i[o*N_IN+i]));
  end

  // Stage 2: one adder tree per output.
  always_ff @(posedge clk) begin
    for (int o = 0; o < int'(N_OUT); o++) begin
      sum_t s;
      s = '0;
      for (int i = 0; i < int'(N_IN); i++) s = s + SUM_W'(prod_q[o*N_IN+i]);
      sum_q[o] <= s;
    end
  end

  // Stage 3: accumulate; partial sums enter with 2*FRAC fractional bits.
  always_ff @(posedge clk) begin
    for (int o = 0; o < int'(N_OUT); o++) begin
      if (init_i)    acc_q[o] <= acc_t'($signed(init_val_i[o])) <<< NATIVE_FRAC;
      else if (v2_q) acc_q[o] <= acc_q[o] + ACC_W'(sum_q[o]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0; l1_q <= 1'b0; v2_q <= 1'b0; l2_q <= 1'b0; done_q <= 1'b0;
    end else begin
      v1_q   <= valid_i;
      l1_q   <= valid_i && last_i;
      v2_q   <= v1_q;
      l2_q   <= l1_q;
      done_q <= l2_q;
    end
  end

  // Back to native: drop NATIVE_FRAC fraction bits (floor) and saturate.
  always_comb begin
    for (int o = 0; o < int'(N_OUT); o++) begin
      acc_t r;
      r = acc_q[o] >>> NATIVE_FRAC;
      if (r > acc_t'(32767))       res_o[o] = 16'h7fff;
      else if (r < -acc_t'(32768)) res_o[o] = 16'h8000;
      else                         res_o[o] = r[NATIVE_W-1:0];
    end
  end

  assign res_valid_o = done_q;

endmodule
