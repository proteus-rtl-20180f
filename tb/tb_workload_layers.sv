// tb_workload_layers: runs the per-layer precision sequences of LeNet,
// Convnet, AlexNet, NiN and GoogLeNet (data 2 to 14 bits, weights 7 to 10
// bits) through a reduced node (3 NFUs of 4 x 4 lanes), each layer reading
// the previous layer's packed output from the central eDRAM. Layer
// dimensions are reduced to 6 values x 6 entries per layer; only the
// precisions follow the networks. See tb_node_run.
// The precision sequences are the published per-layer minimums; the layer
// shapes, exponents and node size are this testbench's own choices.
module tb_workload_layers;
  localparam int unsigned WATCHDOG = 2000000;

  tb_node_run #(.N_NFU(3), .N_IN(4), .N_OUT(4), .SB_DEPTH(128), .EDRAM_DEPTH(256),
                .E1(6), .FULL(0), .WORKLOADS(1)) u_run ();

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
