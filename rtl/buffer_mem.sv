// buffer_mem: one of the accelerator's on-chip buffers, written as an array
// with one synchronous write port and one synchronous read port.
//
// The same module serves as NBin (64 rows of 16 x 16 bits, 2KB SRAM), NBout
// (64 rows of 16 x 16 bits), SB (2MB eDRAM, rows of 256 x 16 bits, 4096
// rows) and the node's central eDRAM (4MB, rows of 16 x 16 bits, 131072
// rows). The sizes and row widths are the document's; the port structure,
// the one-cycle read latency and the read-before-write behaviour (a read of
// the row being written returns the old contents) are this design's own.
// A row's width is the buffer's access width: with Proteus the physical
// organisation is unchanged and packed data simply occupies fewer rows.
//
// Timing: rd_data_o is valid the cycle after rd_en_i; it holds its value
// while rd_en_i is low.
module buffer_mem #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             rd_en_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rd_data_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk) begin
    if (rd_en_i) rd_data_o <= mem[raddr_i];
  end

endmodule
