// tb_proteus_top: two chained layers on a reduced node (3 NFUs of 4 x 4
// lanes, small SB and eDRAM) plus the GPU remapping. See tb_node_run.
// The NFU count, lane counts, depths and precisions are this testbench's
// own choices; the full design's sizes are exercised by tb_proteus_top_full.
module tb_proteus_top;
  localparam int unsigned WATCHDOG = 2000000;

  tb_node_run #(.N_NFU(3), .N_IN(4), .N_OUT(4), .SB_DEPTH(128), .EDRAM_DEPTH(256),
                .LAYERS(2), .K1(12), .E1(6), .E2(3), .FULL(0)) u_run ();

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
