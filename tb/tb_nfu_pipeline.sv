// tb_nfu_pipeline: checks the compute pipeline at a reduced size (4 inputs,
// 3 outputs) against an integer model: a pass of K cycles must produce
// sat16(floor((init*2^8 + sum_k sum_i x*w) / 2^8)) three cycles after the
// cycle that carries last_i. Saturation in both directions must occur.
module tb_nfu_pipeline;
  import proteus_pkg::*;
  localparam int NI = 4, NO = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic init, valid, last, rvalid;
  word_t init_val [NO];
  word_t x [NI];
  word_t w [NO*NI];
  word_t res [NO];
  int checks = 0, failures = 0, sat = 0;

  nfu_pipeline #(.N_IN(NI), .N_OUT(NO)) dut (.clk, .rst_n, .init_i(init), .init_val_i(init_val),
    .valid_i(valid), .last_i(last), .x_i(x), .w_i(w), .res_valid_o(rvalid), .res_o(res));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc [NO];
    longint r;
    int k, sh;
    init = 0; valid = 0; last = 0;
    foreach (init_val[o]) init_val[o] = '0;
    foreach (x[i]) x[i] = '0;
    foreach (w[j]) w[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      k  = 1 + $urandom() % 12;
      sh = $urandom() % 9;
      @(negedge clk);
      init = 1;
      for (int o = 0; o < NO; o++) begin
        init_val[o] = (t % 2) ? word_t'($urandom()) : '0;
        acc[o] = longint'($signed(init_val[o])) * 256;
      end
      @(negedge clk);
      init = 0;
      for (int c = 0; c < k; c++) begin
        valid = 1; last = (c == k - 1);
        foreach (x[i]) x[i] = word_t'($signed(16'($urandom())) >>> sh);
        foreach (w[j]) w[j] = word_t'($signed(16'($urandom())) >>> sh);
        for (int o = 0; o < NO; o++)
          for (int i = 0; i < NI; i++)
            acc[o] += longint'($signed(x[i])) * longint'($signed(w[o*NI+i]));
        @(negedge clk);
      end
      valid = 0; last = 0;
      for (int d = 1; d <= 3; d++) begin
        checks++;
        if (rvalid != (d == 3)) begin
          failures++; $display("FAIL t=%0d latency d=%0d rvalid=%b", t, d, rvalid);
        end
        if (d < 3) @(negedge clk);
      end
      for (int o = 0; o < NO; o++) begin
        r = acc[o] >>> 8;
        if (r > 32767) begin r = 32767; sat++; end
        if (r < -32768) begin r = -32768; sat++; end
        checks++;
        if ($signed(res[o]) != r) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d o=%0d got %0d exp %0d", t, o, $signed(res[o]), r);
        end
      end
    end
    if (sat == 0) failures++;
    $display("saturated results %0d", sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
