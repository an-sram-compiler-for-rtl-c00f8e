// One tile of the memory network: an SRAM block, its mesh router and the
// network interface between them and the core stacked above the tile.
// The four mesh links are indexed 0..3 = north, east, south, west (router
// ports 1..4); the router's local port belongs to the network interface.
// Link timing and handshake are those of noc_router; core timing is that
// of mem_ni. Verilator's UNOPTFLAT report on the per-port link arrays is
// the array-granularity false loop described in sram_array.
module mem_tile
  import sram_pkg::*;
#(
  parameter int unsigned MESH_X      = 4,
  parameter int unsigned MESH_Y      = 4,
  parameter int unsigned MY_X        = 0,
  parameter int unsigned MY_Y        = 0,
  parameter int unsigned BLOCK_BYTES = 131072,
  parameter int unsigned SUB_ROWS    = 64,
  parameter int unsigned SUB_COLS    = 64,
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned TAG_W       = 4,
  parameter int unsigned BUF_DEPTH   = 4,
  parameter int unsigned RSP_DEPTH   = 8,
  parameter sub_type_e   SUB_TYPE    = SUB_STF,
  localparam int unsigned X_W    = (MESH_X > 1) ? $clog2(MESH_X) : 1,
  localparam int unsigned Y_W    = (MESH_Y > 1) ? $clog2(MESH_Y) : 1,
  localparam int unsigned BI_W   = (MESH_X * MESH_Y > 1) ? $clog2(MESH_X * MESH_Y) : 1,
  localparam int unsigned BA_W   = $clog2(BLOCK_BYTES * 8 / DATA_W),
  localparam int unsigned GA_W   = BI_W + BA_W,
  localparam int unsigned BTAG_W = 1 + X_W + Y_W + TAG_W,
  localparam int unsigned FLIT_W = flit_width(X_W, Y_W, TAG_W, BA_W, DATA_W),
  localparam int unsigned VC_W   = $clog2(NUM_VC)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              core_req_valid,
  output logic              core_req_ready,
  input  logic              core_req_we,
  input  logic [GA_W-1:0]   core_req_addr,
  input  logic [DATA_W-1:0] core_req_wdata,
  input  logic [TAG_W-1:0]  core_req_tag,
  output logic              core_rsp_valid,
  output logic              core_rsp_we,
  output logic [DATA_W-1:0] core_rsp_rdata,
  output logic [TAG_W-1:0]  core_rsp_tag,
  input  logic              link_in_valid [4],
  input  logic [VC_W-1:0]   link_in_vc    [4],
  input  logic [FLIT_W-1:0] link_in_flit  [4],
  output logic [NUM_VC-1:0] link_in_ready [4],
  output logic              link_out_valid[4],
  output logic [VC_W-1:0]   link_out_vc   [4],
  output logic [FLIT_W-1:0] link_out_flit [4],
  input  logic [NUM_VC-1:0] link_out_ready[4]
);
  logic              r_in_valid [NUM_PORTS];
  logic [VC_W-1:0]   r_in_vc    [NUM_PORTS];
  logic [FLIT_W-1:0] r_in_flit  [NUM_PORTS];
  logic [NUM_VC-1:0] r_in_ready [NUM_PORTS];
  logic              r_out_valid[NUM_PORTS];
  logic [VC_W-1:0]   r_out_vc   [NUM_PORTS];
  logic [FLIT_W-1:0] r_out_flit [NUM_PORTS];
  logic [NUM_VC-1:0] r_out_ready[NUM_PORTS];

  logic              blk_req_valid, blk_req_we, blk_rsp_valid, blk_rsp_we;
  logic [BA_W-1:0]   blk_req_addr;
  logic [DATA_W-1:0] blk_req_wdata, blk_rsp_rdata;
  logic [BTAG_W-1:0] blk_req_tag, blk_rsp_tag;

  for (genvar d = 0; d < 4; d++) begin : g_link
    assign r_in_valid[d+1]  = link_in_valid[d];
    assign r_in_vc[d+1]     = link_in_vc[d];
    assign r_in_flit[d+1]   = link_in_flit[d];
    assign link_in_ready[d] = r_in_ready[d+1];
    assign link_out_valid[d] = r_out_valid[d+1];
    assign link_out_vc[d]    = r_out_vc[d+1];
    assign link_out_flit[d]  = r_out_flit[d+1];
    assign r_out_ready[d+1]  = link_out_ready[d];
  end

  noc_router #(
    .X_W(X_W), .Y_W(Y_W), .MY_X(MY_X), .MY_Y(MY_Y),
    .FLIT_W(FLIT_W), .BUF_DEPTH(BUF_DEPTH)
  ) u_router (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (r_in_valid),
    .in_vc    (r_in_vc),
    .in_flit  (r_in_flit),
    .in_ready (r_in_ready),
    .out_valid(r_out_valid),
    .out_vc   (r_out_vc),
    .out_flit (r_out_flit),
    .out_ready(r_out_ready)
  );

  mem_ni #(
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(MY_X), .MY_Y(MY_Y),
    .BA_W(BA_W), .DATA_W(DATA_W), .TAG_W(TAG_W), .RSP_DEPTH(RSP_DEPTH)
  ) u_ni (
    .clk           (clk),
    .rst_n         (rst_n),
    .core_req_valid(core_req_valid),
    .core_req_ready(core_req_ready),
    .core_req_we   (core_req_we),
    .core_req_addr (core_req_addr),
    .core_req_wdata(core_req_wdata),
    .core_req_tag  (core_req_tag),
    .core_rsp_valid(core_rsp_valid),
    .core_rsp_we   (core_rsp_we),
    .core_rsp_rdata(core_rsp_rdata),
    .core_rsp_tag  (core_rsp_tag),
    .blk_req_valid (blk_req_valid),
    .blk_req_we    (blk_req_we),
    .blk_req_addr  (blk_req_addr),
    .blk_req_wdata (blk_req_wdata),
    .blk_req_tag   (blk_req_tag),
    .blk_rsp_valid (blk_rsp_valid),
    .blk_rsp_we    (blk_rsp_we),
    .blk_rsp_rdata (blk_rsp_rdata),
    .blk_rsp_tag   (blk_rsp_tag),
    .inj_valid     (r_in_valid[PORT_LOCAL]),
    .inj_vc        (r_in_vc[PORT_LOCAL]),
    .inj_flit      (r_in_flit[PORT_LOCAL]),
    .inj_ready     (r_in_ready[PORT_LOCAL]),
    .ej_valid      (r_out_valid[PORT_LOCAL]),
    .ej_vc         (r_out_vc[PORT_LOCAL]),
    .ej_flit       (r_out_flit[PORT_LOCAL]),
    .ej_ready      (r_out_ready[PORT_LOCAL])
  );

  sram_block #(
    .BYTES(BLOCK_BYTES), .ROWS(SUB_ROWS), .COLS(SUB_COLS), .DATA_W(DATA_W),
    .TAG_W(BTAG_W), .SUB_TYPE(SUB_TYPE)
  ) u_block (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_valid(blk_req_valid),
    .req_we   (blk_req_we),
    .req_addr (blk_req_addr),
    .req_wdata(blk_req_wdata),
    .req_tag  (blk_req_tag),
    .rsp_valid(blk_rsp_valid),
    .rsp_we   (blk_rsp_we),
    .rsp_rdata(blk_rsp_rdata),
    .rsp_tag  (blk_rsp_tag)
  );

endmodule
