// Mesh router of the memory network.
// Five ports (local, north, east, south, west; see sram_pkg::port_e), each
// with NUM_VC virtual channels. Every input VC has a FIFO of BUF_DEPTH
// single-flit packets. The head flit of each input VC is routed
// dimension-order (first along X, then along Y), which cannot deadlock in
// a mesh. VC0 carries requests and VC1 responses, so responses can always
// drain while requests wait. A flit stays on its VC end to end.
// Each output port grants one input VC per cycle, round robin, and only if
// the downstream buffer of that VC has room (out_ready). A flit written
// into an input FIFO at one edge can leave on the next cycle, so one hop
// costs one cycle.
// Flit layout: [FLIT_W-1 -: X_W] destination x, next Y_W bits destination
// y, the rest is payload the router does not look at.
// Link handshake, per VC: a flit moves when out_valid is high on VC v and
// out_ready[v] is high. in_ready comes from FIFO occupancy only.
module noc_router
  import sram_pkg::*;
#(
  parameter int unsigned X_W       = 2,
  parameter int unsigned Y_W       = 2,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned FLIT_W    = 64,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned VC_W     = $clog2(NUM_VC),
  localparam int unsigned NREQ     = NUM_PORTS * NUM_VC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid [NUM_PORTS],
  input  logic [VC_W-1:0]   in_vc    [NUM_PORTS],
  input  logic [FLIT_W-1:0] in_flit  [NUM_PORTS],
  output logic [NUM_VC-1:0] in_ready [NUM_PORTS],
  output logic              out_valid[NUM_PORTS],
  output logic [VC_W-1:0]   out_vc   [NUM_PORTS],
  output logic [FLIT_W-1:0] out_flit [NUM_PORTS],
  input  logic [NUM_VC-1:0] out_ready[NUM_PORTS]
);
  localparam int unsigned PW = $clog2(BUF_DEPTH);

  // Input VC buffers, indexed by q = port * NUM_VC + vc.
  logic [FLIT_W-1:0] buf_q [NREQ][BUF_DEPTH];
  logic [PW-1:0]     rd_ptr [NREQ];
  logic [PW-1:0]     wr_ptr [NREQ];
  logic [PW:0]       count  [NREQ];
  logic [NREQ-1:0]   push, pop;
  logic [FLIT_W-1:0] head  [NREQ];
  port_e             route [NREQ];

  // Output allocation.
  logic [NREQ-1:0]   sa_req   [NUM_PORTS];
  logic [NREQ-1:0]   sa_grant [NUM_PORTS];

  function automatic port_e xy_route(input logic [FLIT_W-1:0] f);
    logic [X_W-1:0] dx;
    logic [Y_W-1:0] dy;
    dx = f[FLIT_W-1 -: X_W];
    dy = f[FLIT_W-X_W-1 -: Y_W];
    if (dx > X_W'(MY_X))      return PORT_EAST;
    else if (dx < X_W'(MY_X)) return PORT_WEST;
    else if (dy > Y_W'(MY_Y)) return PORT_SOUTH;
    else if (dy < Y_W'(MY_Y)) return PORT_NORTH;
    else                      return PORT_LOCAL;
  endfunction

  always_comb begin
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      for (int unsigned v = 0; v < NUM_VC; v++) begin
        in_ready[p][v]        = (count[p*NUM_VC+v] != (PW+1)'(BUF_DEPTH));
        push[p*NUM_VC+v]      = in_valid[p] && (in_vc[p] == VC_W'(v)) && in_ready[p][v];
      end
  end

  always_comb begin
    for (int unsigned q = 0; q < NREQ; q++) begin
      head[q]  = buf_q[q][rd_ptr[q]];
      route[q] = xy_route(head[q]);
    end
  end

  // Requests: a non-empty input VC asks for the output its head routes to,
  // when the next router has room on the same VC.
  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++)
      for (int unsigned q = 0; q < NREQ; q++)
        sa_req[o][q] = (count[q] != '0) && (route[q] == port_e'(o)) &&
                       out_ready[o][q % NUM_VC];
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    rr_arbiter #(.N(NREQ)) u_arb (
      .clk    (clk),
      .rst_n  (rst_n),
      .req    (sa_req[o]),
      .advance(1'b1),
      .grant  (sa_grant[o])
    );

    always_comb begin
      out_valid[o] = |sa_grant[o];
      out_vc[o]    = '0;
      out_flit[o]  = '0;
      for (int unsigned q = 0; q < NREQ; q++)
        if (sa_grant[o][q]) begin
          out_vc[o]   = VC_W'(q % NUM_VC);
          out_flit[o] = head[q];
        end
    end
  end

  always_comb begin
    pop = '0;
    for (int unsigned o = 0; o < NUM_PORTS; o++)
      pop = pop | sa_grant[o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned q = 0; q < NREQ; q++) begin
        rd_ptr[q] <= '0;
        wr_ptr[q] <= '0;
        count[q]  <= '0;
      end
    end else begin
      for (int unsigned q = 0; q < NREQ; q++) begin
        if (push[q]) wr_ptr[q] <= (int'(wr_ptr[q]) == BUF_DEPTH - 1) ? '0 : wr_ptr[q] + PW'(1);
        if (pop[q])  rd_ptr[q] <= (int'(rd_ptr[q]) == BUF_DEPTH - 1) ? '0 : rd_ptr[q] + PW'(1);
        count[q] <= count[q] + (PW+1)'(push[q]) - (PW+1)'(pop[q]);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      for (int unsigned v = 0; v < NUM_VC; v++)
        if (push[p*NUM_VC+v]) buf_q[p*NUM_VC+v][wr_ptr[p*NUM_VC+v]] <= in_flit[p];
  end

  // Each input VC is requested by at most one output, so it is popped at
  // most once per cycle; never pop an empty buffer.
  for (genvar q = 0; q < NREQ; q++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) pop[q] |-> count[q] != '0)
      else $error("noc_router: pop from empty buffer");
  end

endmodule
