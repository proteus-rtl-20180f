// proteus_top: the two forms of the Proteus translation layer side by side.
//
//   * proteus_node: an accelerator node (16 NFUs around a central eDRAM)
//     whose buffers hold data and weights in per-layer reduced precision,
//     with unpackers before and packers after the compute pipelines. Its
//     ports are brought out unchanged.
//   * gpu_remap: the GPU form, an address remapping and line-level
//     unpack/pack network for data stored in cache lines. Its ports are
//     brought out with a gpu_ prefix.
// The two share nothing but the package; they sit together here because
// they are the two ways the same storage scheme is applied. All parameters
// default to the full design's sizes.
module proteus_top
  import proteus_pkg::*;
#(
  parameter int unsigned N_NFU       = 16,
  parameter int unsigned N_IN        = 16,
  parameter int unsigned N_OUT       = 16,
  parameter int unsigned NBIN_DEPTH  = 64,
  parameter int unsigned NBOUT_DEPTH = 64,
  parameter int unsigned SB_DEPTH    = 4096,
  parameter int unsigned EDRAM_DEPTH = 131072,
  parameter int unsigned LINE_BITS   = 1024,
  parameter int unsigned GPU_ADDR_W  = 32,
  parameter int unsigned GPU_IDX_W   = 24,
  localparam int unsigned SB_AW      = $clog2(SB_DEPTH),
  localparam int unsigned E_AW       = $clog2(EDRAM_DEPTH),
  localparam int unsigned NFU_AW     = (N_NFU > 1) ? $clog2(N_NFU) : 1,
  localparam int unsigned ROW_W      = N_IN * NATIVE_W,
  localparam int unsigned SB_W       = N_OUT * N_IN * NATIVE_W,
  localparam int unsigned OFF_W      = $clog2(LINE_BITS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // accelerator node
  input  layer_cfg_t            cfg_i,
  input  logic                  ext_we_i,
  input  logic [E_AW-1:0]       ext_addr_i,
  input  logic [ROW_W-1:0]      ext_wdata_i,
  input  logic                  ext_re_i,
  output logic [ROW_W-1:0]      ext_rdata_o,
  input  logic                  sb_we_i,
  input  logic [NFU_AW-1:0]     sb_nfu_i,
  input  logic [SB_AW-1:0]      sb_waddr_i,
  input  logic [SB_W-1:0]       sb_wdata_i,
  input  logic                  cmd_valid_i,
  output logic                  cmd_ready_o,
  input  cmd_t                  cmd_i,
  output logic                  done_o,
  output logic                  realign_o,
  output logic                  flush_o,
  // GPU remapping
  input  logic [GPU_ADDR_W-1:0] gpu_base_i,
  input  logic [GPU_IDX_W-1:0]  gpu_index_i,
  input  logic [PREC_W-1:0]     gpu_p_i,
  input  logic [POS_W-1:0]      gpu_lsb_i,
  output logic [PREC_W-1:0]     gpu_p_eff_o,
  output logic [GPU_ADDR_W-1:0] gpu_line_addr_o,
  output logic [OFF_W-1:0]      gpu_bit_off_o,
  input  logic [LINE_BITS-1:0]  gpu_line_i,
  output word_t                 gpu_rvalue_o,
  input  word_t                 gpu_wvalue_i,
  output logic [LINE_BITS-1:0]  gpu_wdata_o,
  output logic [LINE_BITS-1:0]  gpu_wmask_o
);

  proteus_node #(
    .N_NFU(N_NFU), .N_IN(N_IN), .N_OUT(N_OUT), .NBIN_DEPTH(NBIN_DEPTH),
    .NBOUT_DEPTH(NBOUT_DEPTH), .SB_DEPTH(SB_DEPTH), .EDRAM_DEPTH(EDRAM_DEPTH)
  ) u_node (
    .clk, .rst_n, .cfg_i, .ext_we_i, .ext_addr_i, .ext_wdata_i, .ext_re_i, .ext_rdata_o,
    .sb_we_i, .sb_nfu_i, .sb_waddr_i, .sb_wdata_i, .cmd_valid_i, .cmd_ready_o, .cmd_i,
    .done_o, .realign_o, .flush_o
  );

  gpu_remap #(.LINE_BITS(LINE_BITS), .ADDR_W(GPU_ADDR_W), .IDX_W(GPU_IDX_W)) u_gpu (
    .base_i(gpu_base_i), .index_i(gpu_index_i), .p_i(gpu_p_i), .lsb_i(gpu_lsb_i),
    .p_eff_o(gpu_p_eff_o), .line_addr_o(gpu_line_addr_o), .bit_off_o(gpu_bit_off_o),
    .line_i(gpu_line_i), .rvalue_o(gpu_rvalue_o), .wvalue_i(gpu_wvalue_i),
    .wdata_o(gpu_wdata_o), .wmask_o(gpu_wmask_o)
  );

endmodule
