// tb_proteus_top_full: two chained layers through the design at its
// default size: 16 NFUs of 16 x 16 lanes, 64-row NBin/NBout, 2MB SBs, the
// 4MB central eDRAM and 128-byte GPU lines. See tb_node_run.
// The sizes are the published node's (16 NFUs, 2KB NBin/NBout, 2MB SB, 4MB
// eDRAM); the layer shapes and precisions are this testbench's own.
module tb_proteus_top_full;
  localparam int unsigned WATCHDOG = 2000000;

  tb_node_run #(.N_NFU(16), .N_IN(16), .N_OUT(16), .SB_DEPTH(4096), .EDRAM_DEPTH(131072),
                .LAYERS(2), .K1(12), .E1(4), .E2(2), .FULL(1)) u_run ();

  int unsigned cycles = 0;
  always @(posedge u_run.clk) cycles <= cycles + 1;

  // Report when the run completes; the watchdog fails a run that hangs.
  initial begin
    wait (u_run.finished || cycles >= WATCHDOG);
    if (!u_run.finished) begin
      u_run.failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", u_run.checks, u_run.failures);
    $finish;
  end
endmodule
