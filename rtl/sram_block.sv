// Single-port SRAM block: BYTES of storage in ROWS x COLS subarrays joined
// by a pipelined H-tree (see sram_htree, htree_node).
// Word address layout (DATA_W-bit words): high bits pick the subarray
// (root-level child first), then the row, then the word within the row.
// A request (read or write) may be presented every cycle; each one returns
// exactly one response, in order, LATENCY cycles later. A write response
// carries rsp_we = 1 and no data. LATENCY = 2 * levels + 1 is the same for
// every address: 9 cycles for the default 128 KB of 64x64 subarrays.
module sram_block
  import sram_pkg::*;
#(
  parameter int unsigned BYTES    = 131072,
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned TAG_W    = 4,
  parameter sub_type_e   SUB_TYPE = SUB_STF,
  localparam int unsigned N_SUB   = BYTES * 8 / (ROWS * COLS),
  localparam int unsigned ADDR_W  = $clog2(BYTES * 8 / DATA_W),
  localparam int unsigned LATENCY = block_latency(N_SUB)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  input  logic [TAG_W-1:0]  req_tag,
  output logic              rsp_valid,
  output logic              rsp_we,
  output logic [DATA_W-1:0] rsp_rdata,
  output logic [TAG_W-1:0]  rsp_tag
);
  if (N_SUB < 1 || (1 << $clog2(N_SUB)) != N_SUB) begin : g_bad_size
    $error("sram_block: BYTES must hold a power-of-two number of subarrays");
  end

  sram_htree #(
    .N_SUB(N_SUB), .ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W),
    .TAG_W(TAG_W), .SUB_TYPE(SUB_TYPE)
  ) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_valid(req_valid),
    .req_we   (req_we),
    .req_addr (req_addr),
    .req_wdata(req_wdata),
    .req_tag  (req_tag),
    .rsp_valid(rsp_valid),
    .rsp_we   (rsp_we),
    .rsp_rdata(rsp_rdata),
    .rsp_tag  (rsp_tag)
  );

endmodule
