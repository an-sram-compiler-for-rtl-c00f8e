// Shared constants and types of the multi-port SRAM array.
// The default geometry is the 2 MB array: 4x4 tiles, each holding a 128 KB
// block built from 64-row x 64-column subarrays, with a 32-bit data bus.
// Subarray "types" (single-tier and the two stacked-peripheral variants)
// differ only in placement, so the enum below is carried as a label and
// changes no logic. Network constants (port numbering, virtual channel
// assignment) are choices of this design.
package sram_pkg;

  // Subarray placement variants. STF: cells and peripherals in one tier.
  // MTF_BL: bit-line peripherals stacked above the cells. MTF_ALL: all
  // peripherals stacked above the cells.
  typedef enum logic [1:0] {
    SUB_STF     = 2'd0,
    SUB_MTF_BL  = 2'd1,
    SUB_MTF_ALL = 2'd2
  } sub_type_e;

  // Mesh router ports.
  localparam int unsigned NUM_PORTS = 5;
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,  // y - 1
    PORT_EAST  = 3'd2,  // x + 1
    PORT_SOUTH = 3'd3,  // y + 1
    PORT_WEST  = 3'd4   // x - 1
  } port_e;

  // Virtual channels: requests and responses travel on separate VCs so a
  // stalled request can never block the response that would drain it.
  localparam int unsigned NUM_VC = 2;
  localparam int unsigned VC_REQ = 0;
  localparam int unsigned VC_RSP = 1;

  // Default geometry.
  localparam int unsigned DEF_MESH_X      = 4;
  localparam int unsigned DEF_MESH_Y      = 4;
  localparam int unsigned DEF_BLOCK_BYTES = 131072;
  localparam int unsigned DEF_SUB_ROWS    = 64;
  localparam int unsigned DEF_SUB_COLS    = 64;
  localparam int unsigned DEF_DATA_W      = 32;
  localparam int unsigned DEF_TAG_W       = 4;

  // Cycles of a block access through an H-tree over n_sub subarrays:
  // one register stage per level on the way down, one cycle in the
  // subarray, one register stage per level on the way up.
  function automatic int unsigned htree_levels(input int unsigned n_sub);
    int unsigned n, l;
    n = n_sub;
    l = 0;
    while (n > 1) begin
      n = (n % 4 == 0 && ($clog2(n) % 2 == 0)) ? n / 4 : n / 2;
      l++;
    end
    return l;
  endfunction

  // Width of a memory-network flit (see mem_ni for the field order).
  function automatic int unsigned flit_width(input int unsigned x_w, input int unsigned y_w,
                                             input int unsigned tag_w, input int unsigned ba_w,
                                             input int unsigned data_w);
    return 2 * x_w + 2 * y_w + 2 + tag_w + ba_w + data_w;
  endfunction

  function automatic int unsigned block_latency(input int unsigned n_sub);
    return 2 * htree_levels(n_sub) + 1;
  endfunction

endpackage
