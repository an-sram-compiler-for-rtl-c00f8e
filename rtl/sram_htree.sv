// H-tree of N_SUB subarrays, built recursively.
// A tree over more than one subarray is an htree_node whose children are
// smaller trees. The node has 4 children, except at the root of a tree
// whose size is an odd power of two, where it has 2. So 256 subarrays
// form 4 levels of 4-way nodes. A tree of one subarray is a leaf: the
// column multiplexer plus the subarray itself, with the request tag held
// for the cycle of the subarray access.
// Address layout at any level: the top bits choose the child, then come
// the row address, then (lowest) the word index within the row.
// Latency: one cycle per level down, one in the subarray, one per level up.
// Lint note: when this module is linted on its own as a top, Verilator
// does not expand its recursive child instances. It then reports the
// child-response nets of the root node as undriven. Inside sram_block the
// children are built and drive those nets, as the block's lint and
// simulation show.
module sram_htree
  import sram_pkg::*;
#(
  parameter int unsigned N_SUB    = 256,
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned TAG_W    = 4,
  parameter sub_type_e   SUB_TYPE = SUB_STF,
  localparam int unsigned WSEL_BITS = $clog2(COLS / DATA_W),
  localparam int unsigned ADDR_W    = $clog2(N_SUB) + $clog2(ROWS) + WSEL_BITS
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
  if (N_SUB == 1) begin : g_leaf
    localparam int unsigned RA_W  = $clog2(ROWS);
    localparam int unsigned SEL_W = (WSEL_BITS > 0) ? WSEL_BITS : 1;

    logic [SEL_W-1:0] wsel;
    logic [COLS-1:0]  col_wdata, col_wmask, col_rdata;

    if (WSEL_BITS > 0) begin : g_sel
      assign wsel = req_addr[WSEL_BITS-1:0];
    end else begin : g_nosel
      assign wsel = '0;
    end

    sram_col_mux #(.COLS(COLS), .DATA_W(DATA_W)) u_mux (
      .clk      (clk),
      .req_valid(req_valid),
      .sel      (wsel),
      .wdata    (req_wdata),
      .col_wdata(col_wdata),
      .col_wmask(col_wmask),
      .col_rdata(col_rdata),
      .rdata    (rsp_rdata)
    );

    sram_subarray #(.ROWS(ROWS), .COLS(COLS), .SUB_TYPE(SUB_TYPE)) u_sub (
      .clk      (clk),
      .rst_n    (rst_n),
      .req_valid(req_valid),
      .req_we   (req_we),
      .req_row  (req_addr[ADDR_W-1 -: RA_W]),
      .req_wdata(col_wdata),
      .req_wmask(col_wmask),
      .rsp_valid(rsp_valid),
      .rsp_we   (rsp_we),
      .rsp_rdata(col_rdata)
    );

    always_ff @(posedge clk) begin
      if (req_valid) rsp_tag <= req_tag;
    end

  end else begin : g_node
    localparam int unsigned FANOUT = ($clog2(N_SUB) % 2 == 1) ? 2 : 4;
    localparam int unsigned CA_W   = ADDR_W - $clog2(FANOUT);

    logic [FANOUT-1:0] c_req_valid, c_rsp_valid, c_rsp_we;
    logic              c_req_we;
    logic [CA_W-1:0]   c_req_addr;
    logic [DATA_W-1:0] c_req_wdata;
    logic [TAG_W-1:0]  c_req_tag;
    logic [DATA_W-1:0] c_rsp_rdata [FANOUT];
    logic [TAG_W-1:0]  c_rsp_tag   [FANOUT];

    htree_node #(.FANOUT(FANOUT), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .TAG_W(TAG_W)) u_node (
      .clk        (clk),
      .rst_n      (rst_n),
      .p_req_valid(req_valid),
      .p_req_we   (req_we),
      .p_req_addr (req_addr),
      .p_req_wdata(req_wdata),
      .p_req_tag  (req_tag),
      .p_rsp_valid(rsp_valid),
      .p_rsp_we   (rsp_we),
      .p_rsp_rdata(rsp_rdata),
      .p_rsp_tag  (rsp_tag),
      .c_req_valid(c_req_valid),
      .c_req_we   (c_req_we),
      .c_req_addr (c_req_addr),
      .c_req_wdata(c_req_wdata),
      .c_req_tag  (c_req_tag),
      .c_rsp_valid(c_rsp_valid),
      .c_rsp_we   (c_rsp_we),
      .c_rsp_rdata(c_rsp_rdata),
      .c_rsp_tag  (c_rsp_tag)
    );

    for (genvar c = 0; c < FANOUT; c++) begin : g_child
      sram_htree #(
        .N_SUB(N_SUB / FANOUT), .ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W),
        .TAG_W(TAG_W), .SUB_TYPE(SUB_TYPE)
      ) u_sub (
        .clk      (clk),
        .rst_n    (rst_n),
        .req_valid(c_req_valid[c]),
        .req_we   (c_req_we),
        .req_addr (c_req_addr),
        .req_wdata(c_req_wdata),
        .req_tag  (c_req_tag),
        .rsp_valid(c_rsp_valid[c]),
        .rsp_we   (c_rsp_we[c]),
        .rsp_rdata(c_rsp_rdata[c]),
        .rsp_tag  (c_rsp_tag[c])
      );
    end
  end

endmodule
