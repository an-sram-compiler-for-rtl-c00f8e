// Network interface of one memory tile: the junction of the core above the
// tile, the tile's SRAM block and the tile's router.
//
// Core requests carry a global word address. Its high bits are the index of
// the target block, tile y*MESH_X + x; the rest is the address inside the
// block. A request for the local block goes straight to the block, without
// the router. A request for another block becomes a request flit on VC0
// to that tile. Request flits arriving from the network are executed on the
// local block. Their responses are queued and sent back on VC1. Response
// flits for this core, and local block responses, go to the core response
// port. Every request, writes included, gets exactly one response carrying
// the core's tag. Responses from different tiles may come back in any
// order.
//
// The block has one port, so a local request and a remote request in the
// same cycle conflict. While the core has a local request waiting, the
// turn alternates every cycle: on the network's turn the router may hand
// over a request (which then goes first), on the core's turn the router is
// held off. The router offers a flit only when the interface is ready, so
// the turn cannot wait for a conflict to be seen. A remote request enters
// the block only when a slot of the response queue is reserved for it. Remote responses therefore never
// block the block pipeline. In the same cycle a local block response takes
// the core response port ahead of a network response. On the injection
// port, queued responses go ahead of new core requests.
//
// Flit fields, MSB first: dst_x, dst_y, src_x, src_y, is_rsp, we, tag,
// block address, data.
//
// Timing: a local access returns LATENCY cycles after its handshake (the
// block latency). A remote access adds one cycle per hop each way, plus
// the cycles spent waiting in buffers.
module mem_ni
  import sram_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned BA_W      = 15,
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned TAG_W     = 4,
  parameter int unsigned RSP_DEPTH = 8,
  localparam int unsigned X_W      = (MESH_X > 1) ? $clog2(MESH_X) : 1,
  localparam int unsigned Y_W      = (MESH_Y > 1) ? $clog2(MESH_Y) : 1,
  localparam int unsigned BI_W     = (MESH_X * MESH_Y > 1) ? $clog2(MESH_X * MESH_Y) : 1,
  localparam int unsigned GA_W     = BI_W + BA_W,
  localparam int unsigned BTAG_W   = 1 + X_W + Y_W + TAG_W,
  localparam int unsigned FLIT_W   = flit_width(X_W, Y_W, TAG_W, BA_W, DATA_W),
  localparam int unsigned VC_W     = $clog2(NUM_VC)
) (
  input  logic              clk,
  input  logic              rst_n,
  // core port
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
  // local SRAM block
  output logic              blk_req_valid,
  output logic              blk_req_we,
  output logic [BA_W-1:0]   blk_req_addr,
  output logic [DATA_W-1:0] blk_req_wdata,
  output logic [BTAG_W-1:0] blk_req_tag,
  input  logic              blk_rsp_valid,
  input  logic              blk_rsp_we,
  input  logic [DATA_W-1:0] blk_rsp_rdata,
  input  logic [BTAG_W-1:0] blk_rsp_tag,
  // router local port: injection
  output logic              inj_valid,
  output logic [VC_W-1:0]   inj_vc,
  output logic [FLIT_W-1:0] inj_flit,
  input  logic [NUM_VC-1:0] inj_ready,
  // router local port: ejection
  input  logic              ej_valid,
  input  logic [VC_W-1:0]   ej_vc,
  input  logic [FLIT_W-1:0] ej_flit,
  output logic [NUM_VC-1:0] ej_ready
);
  typedef struct packed {
    logic [X_W-1:0]    dst_x;
    logic [Y_W-1:0]    dst_y;
    logic [X_W-1:0]    src_x;
    logic [Y_W-1:0]    src_y;
    logic              is_rsp;
    logic              we;
    logic [TAG_W-1:0]  tag;
    logic [BA_W-1:0]   addr;
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic             remote;
    logic [X_W-1:0]   src_x;
    logic [Y_W-1:0]   src_y;
    logic [TAG_W-1:0] tag;
  } btag_t;

  localparam int unsigned QW = $clog2(RSP_DEPTH);

  // ---- Address decode ----------------------------------------------------
  logic [BI_W-1:0] tgt_idx;
  logic [X_W-1:0]  tgt_x;
  logic [Y_W-1:0]  tgt_y;
  logic            core_local;

  assign tgt_idx    = core_req_addr[GA_W-1 -: BI_W];
  assign tgt_x      = X_W'(int'(tgt_idx) % int'(MESH_X));
  assign tgt_y      = Y_W'(int'(tgt_idx) / int'(MESH_X));
  assign core_local = (tgt_x == X_W'(MY_X)) && (tgt_y == Y_W'(MY_Y));

  flit_t ej_f;
  assign ej_f = flit_t'(ej_flit);

  // ---- Response queue (remote responses waiting for injection) -----------
  flit_t           rspq [RSP_DEPTH];
  logic [QW-1:0]   rq_rd, rq_wr;
  logic [QW:0]     rq_count;
  logic [QW:0]     inflight;      // remote requests inside the block
  logic            rq_push, rq_pop;
  btag_t           rsp_tag_in;

  assign rsp_tag_in = btag_t'(blk_rsp_tag);
  assign rq_push    = blk_rsp_valid && rsp_tag_in.remote;

  // ---- Block port arbitration ---------------------------------------------
  logic cand_local, credit_ok, remote_slot, grant_remote, grant_local;
  logic prefer_remote;

  assign cand_local   = core_req_valid && core_local;
  assign credit_ok    = (inflight + rq_count) < (QW+1)'(RSP_DEPTH);
  assign remote_slot  = credit_ok && !(cand_local && !prefer_remote);
  assign grant_remote = ej_valid && (ej_vc == VC_W'(VC_REQ)) && remote_slot;
  assign grant_local  = cand_local && !grant_remote;

  always_comb begin
    btag_t t;
    blk_req_valid = grant_local || grant_remote;
    if (grant_remote) begin
      t             = '{remote: 1'b1, src_x: ej_f.src_x, src_y: ej_f.src_y, tag: ej_f.tag};
      blk_req_we    = ej_f.we;
      blk_req_addr  = ej_f.addr;
      blk_req_wdata = ej_f.data;
    end else begin
      t             = '{remote: 1'b0, src_x: X_W'(MY_X), src_y: Y_W'(MY_Y), tag: core_req_tag};
      blk_req_we    = core_req_we;
      blk_req_addr  = core_req_addr[BA_W-1:0];
      blk_req_wdata = core_req_wdata;
    end
    blk_req_tag = BTAG_W'(t);
  end

  // ---- Injection ---------------------------------------------------------
  logic inj_rsp, inj_req;
  assign inj_rsp = (rq_count != '0) && inj_ready[VC_RSP];
  assign inj_req = !inj_rsp && core_req_valid && !core_local && inj_ready[VC_REQ];
  assign rq_pop  = inj_rsp;

  always_comb begin
    flit_t f;
    f = rspq[rq_rd];
    if (!inj_rsp) begin
      f = '{dst_x: tgt_x, dst_y: tgt_y, src_x: X_W'(MY_X), src_y: Y_W'(MY_Y),
            is_rsp: 1'b0, we: core_req_we, tag: core_req_tag,
            addr: core_req_addr[BA_W-1:0], data: core_req_wdata};
    end
    inj_valid = inj_rsp || inj_req;
    inj_vc    = inj_rsp ? VC_W'(VC_RSP) : VC_W'(VC_REQ);
    inj_flit  = FLIT_W'(f);
  end

  assign core_req_ready = core_local ? grant_local : inj_req;

  // ---- Ejection and core responses ---------------------------------------
  logic local_rsp, net_rsp;
  assign local_rsp            = blk_rsp_valid && !rsp_tag_in.remote;
  assign ej_ready[VC_REQ]     = remote_slot;
  assign ej_ready[VC_RSP]     = !local_rsp;
  assign net_rsp              = ej_valid && (ej_vc == VC_W'(VC_RSP)) && !local_rsp;

  always_comb begin
    core_rsp_valid = local_rsp || net_rsp;
    if (local_rsp) begin
      core_rsp_we    = blk_rsp_we;
      core_rsp_rdata = blk_rsp_rdata;
      core_rsp_tag   = rsp_tag_in.tag;
    end else begin
      core_rsp_we    = ej_f.we;
      core_rsp_rdata = ej_f.data;
      core_rsp_tag   = ej_f.tag;
    end
  end

  // ---- State ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_rd         <= '0;
      rq_wr         <= '0;
      rq_count      <= '0;
      inflight      <= '0;
      prefer_remote <= 1'b0;
    end else begin
      if (rq_push) rq_wr <= (int'(rq_wr) == RSP_DEPTH - 1) ? '0 : rq_wr + QW'(1);
      if (rq_pop)  rq_rd <= (int'(rq_rd) == RSP_DEPTH - 1) ? '0 : rq_rd + QW'(1);
      rq_count <= rq_count + (QW+1)'(rq_push) - (QW+1)'(rq_pop);
      inflight <= inflight + (QW+1)'(grant_remote) - (QW+1)'(rq_push);
      if (cand_local)
        prefer_remote <= !prefer_remote;
    end
  end

  always_ff @(posedge clk) begin
    if (rq_push)
      rspq[rq_wr] <= '{dst_x: rsp_tag_in.src_x, dst_y: rsp_tag_in.src_y,
                       src_x: X_W'(MY_X), src_y: Y_W'(MY_Y), is_rsp: 1'b1,
                       we: blk_rsp_we, tag: rsp_tag_in.tag, addr: '0,
                       data: blk_rsp_rdata};
  end

  assert property (@(posedge clk) disable iff (!rst_n) rq_push |-> rq_count < (QW+1)'(RSP_DEPTH))
    else $error("mem_ni: response queue overflow");
  assert property (@(posedge clk) disable iff (!rst_n)
                  ej_valid && ej_ready[ej_vc] |-> ej_f.is_rsp == (ej_vc == VC_W'(VC_RSP)))
    else $error("mem_ni: flit on the wrong virtual channel");

endmodule
