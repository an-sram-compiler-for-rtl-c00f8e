// Multi-port SRAM array: MESH_X x MESH_Y tiles on a mesh memory network.
// Each tile holds one SRAM block, a router and a network interface, and
// serves as the memory port of the core stacked above it. Any port reaches
// the whole address space. Default: 4x4 tiles of 128 KB = 2 MB, blocks
// built from 64x64 single-tier subarrays, 32-bit words.
//
// Port arrays are indexed by tile number t = y*MESH_X + x. The word address
// is GA_W bits wide. Its top BI_W bits name the block that holds the word
// (tile t holds global words t*2^BA_W .. (t+1)*2^BA_W - 1).
// A core request is taken when core_req_valid and core_req_ready are both
// high. Its response comes back on the same tile's core_rsp_* with the
// request's tag. The core must accept a response in the cycle it is valid.
// Latency: an access to the tile's own block takes the block latency (9
// cycles by default). An access to another block adds one cycle per mesh
// hop each way, plus any queueing.
// Links at the mesh edge are tied off (no traffic leaves the mesh under XY
// routing).
// Lint note: Verilator reports circular logic (UNOPTFLAT) on the link arrays
// because it treats each whole array as one signal. There is no real
// loop: a router's output valid depends on its neighbour's ready, and that
// comes only from FIFO occupancy (or, on the local port, from core-side
// inputs and interface state).
module sram_array
  import sram_pkg::*;
#(
  parameter int unsigned MESH_X      = DEF_MESH_X,
  parameter int unsigned MESH_Y      = DEF_MESH_Y,
  parameter int unsigned BLOCK_BYTES = DEF_BLOCK_BYTES,
  parameter int unsigned SUB_ROWS    = DEF_SUB_ROWS,
  parameter int unsigned SUB_COLS    = DEF_SUB_COLS,
  parameter int unsigned DATA_W      = DEF_DATA_W,
  parameter int unsigned TAG_W       = DEF_TAG_W,
  parameter int unsigned BUF_DEPTH   = 4,
  parameter int unsigned RSP_DEPTH   = 8,
  parameter sub_type_e   SUB_TYPE    = SUB_STF,
  localparam int unsigned NT   = MESH_X * MESH_Y,
  localparam int unsigned X_W  = (MESH_X > 1) ? $clog2(MESH_X) : 1,
  localparam int unsigned Y_W  = (MESH_Y > 1) ? $clog2(MESH_Y) : 1,
  localparam int unsigned BI_W = (NT > 1) ? $clog2(NT) : 1,
  localparam int unsigned BA_W = $clog2(BLOCK_BYTES * 8 / DATA_W),
  localparam int unsigned GA_W = BI_W + BA_W,
  localparam int unsigned FLIT_W = flit_width(X_W, Y_W, TAG_W, BA_W, DATA_W),
  localparam int unsigned VC_W = $clog2(NUM_VC)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              core_req_valid [NT],
  output logic              core_req_ready [NT],
  input  logic              core_req_we    [NT],
  input  logic [GA_W-1:0]   core_req_addr  [NT],
  input  logic [DATA_W-1:0] core_req_wdata [NT],
  input  logic [TAG_W-1:0]  core_req_tag   [NT],
  output logic              core_rsp_valid [NT],
  output logic              core_rsp_we    [NT],
  output logic [DATA_W-1:0] core_rsp_rdata [NT],
  output logic [TAG_W-1:0]  core_rsp_tag   [NT]
);
  // Link signals, per tile and direction (0 N, 1 E, 2 S, 3 W), seen at the
  // receiving (in_*) and sending (out_*) tile.
  logic              in_valid  [NT][4];
  logic [VC_W-1:0]   in_vc     [NT][4];
  logic [FLIT_W-1:0] in_flit   [NT][4];
  logic [NUM_VC-1:0] in_ready  [NT][4];
  logic              out_valid [NT][4];
  logic [VC_W-1:0]   out_vc    [NT][4];
  logic [FLIT_W-1:0] out_flit  [NT][4];
  logic [NUM_VC-1:0] out_ready [NT][4];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned T = y * MESH_X + x;

      mem_tile #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(x), .MY_Y(y),
        .BLOCK_BYTES(BLOCK_BYTES), .SUB_ROWS(SUB_ROWS), .SUB_COLS(SUB_COLS),
        .DATA_W(DATA_W), .TAG_W(TAG_W), .BUF_DEPTH(BUF_DEPTH),
        .RSP_DEPTH(RSP_DEPTH), .SUB_TYPE(SUB_TYPE)
      ) u_tile (
        .clk           (clk),
        .rst_n         (rst_n),
        .core_req_valid(core_req_valid[T]),
        .core_req_ready(core_req_ready[T]),
        .core_req_we   (core_req_we[T]),
        .core_req_addr (core_req_addr[T]),
        .core_req_wdata(core_req_wdata[T]),
        .core_req_tag  (core_req_tag[T]),
        .core_rsp_valid(core_rsp_valid[T]),
        .core_rsp_we   (core_rsp_we[T]),
        .core_rsp_rdata(core_rsp_rdata[T]),
        .core_rsp_tag  (core_rsp_tag[T]),
        .link_in_valid (in_valid[T]),
        .link_in_vc    (in_vc[T]),
        .link_in_flit  (in_flit[T]),
        .link_in_ready (in_ready[T]),
        .link_out_valid(out_valid[T]),
        .link_out_vc   (out_vc[T]),
        .link_out_flit (out_flit[T]),
        .link_out_ready(out_ready[T])
      );

      // Neighbour in each direction: d, its tile, and the direction back.
      for (genvar d = 0; d < 4; d++) begin : g_dir
        localparam int NX = (d == 1) ? x + 1 : (d == 3) ? x - 1 : x;
        localparam int NY = (d == 2) ? y + 1 : (d == 0) ? y - 1 : y;
        localparam int unsigned BACK = (d + 2) % 4;
        if (NX >= 0 && NX < int'(MESH_X) && NY >= 0 && NY < int'(MESH_Y)) begin : g_link
          localparam int unsigned NT_IDX = NY * MESH_X + NX;
          assign in_valid[T][d]  = out_valid[NT_IDX][BACK];
          assign in_vc[T][d]     = out_vc[NT_IDX][BACK];
          assign in_flit[T][d]   = out_flit[NT_IDX][BACK];
          assign out_ready[T][d] = in_ready[NT_IDX][BACK];
        end else begin : g_edge
          assign in_valid[T][d]  = 1'b0;
          assign in_vc[T][d]     = '0;
          assign in_flit[T][d]   = '0;
          assign out_ready[T][d] = '0;
        end
      end
    end
  end

endmodule
