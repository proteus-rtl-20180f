// tb_buffer_mem: checks the buffer array against a model: random writes and
// reads, one-cycle read latency, output held while no read is requested,
// and old data returned when a row is read in the cycle it is written.
module tb_buffer_mem;
  localparam int W = 64, D = 32;
  logic clk = 1'b0;
  logic we, re;
  logic [4:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0, collisions = 0;

  buffer_mem #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                                          .rd_en_i(re), .raddr_i(raddr), .rd_data_o(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expv;
    logic pend;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = 5'(a); wdata = {$urandom(), $urandom()}; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    pend = 0; expv = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expv) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, rdata, expv);
        end
      end
      re = $urandom() % 3 != 0; raddr = 5'($urandom());
      we = $urandom() % 2 == 1; waddr = 5'($urandom()); wdata = {$urandom(), $urandom()};
      if (t % 5 == 0) waddr = raddr;
      if (re) expv = model[raddr];
      if (re && we && waddr == raddr) collisions++;
      pend = 1;
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
    end
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
