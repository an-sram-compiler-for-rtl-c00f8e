// One router of the H-tree that joins subarrays into an SRAM block.
// Downward (request) path: the request from the parent is registered and
// forwarded to exactly one of FANOUT children, chosen by the top
// log2(FANOUT) address bits. Those bits are stripped from the address the
// children see. Data, write flag and tag go to all children; only the
// selected child's valid is raised.
// Upward (response) path: at most one child answers per cycle (the block
// is single-ported). Its response is multiplexed onto the parent port
// through a register.
// Each direction costs exactly one cycle per level, so a block access
// takes the same number of cycles whatever its address.
module htree_node #(
  parameter int unsigned FANOUT = 4,
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned TAG_W  = 4,
  localparam int unsigned SEL_W = $clog2(FANOUT),
  localparam int unsigned CA_W  = ADDR_W - SEL_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // parent side
  input  logic                    p_req_valid,
  input  logic                    p_req_we,
  input  logic [ADDR_W-1:0]       p_req_addr,
  input  logic [DATA_W-1:0]       p_req_wdata,
  input  logic [TAG_W-1:0]        p_req_tag,
  output logic                    p_rsp_valid,
  output logic                    p_rsp_we,
  output logic [DATA_W-1:0]       p_rsp_rdata,
  output logic [TAG_W-1:0]        p_rsp_tag,
  // child side
  output logic [FANOUT-1:0]       c_req_valid,
  output logic                    c_req_we,
  output logic [CA_W-1:0]         c_req_addr,
  output logic [DATA_W-1:0]       c_req_wdata,
  output logic [TAG_W-1:0]        c_req_tag,
  input  logic [FANOUT-1:0]       c_rsp_valid,
  input  logic [FANOUT-1:0]       c_rsp_we,
  input  logic [DATA_W-1:0]       c_rsp_rdata [FANOUT],
  input  logic [TAG_W-1:0]        c_rsp_tag   [FANOUT]
);
  logic [SEL_W-1:0] sel;
  assign sel = p_req_addr[ADDR_W-1 -: SEL_W];

  // Request demultiplexer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_req_valid <= '0;
    end else begin
      for (int unsigned c = 0; c < FANOUT; c++)
        c_req_valid[c] <= p_req_valid && (sel == SEL_W'(c));
    end
  end

  always_ff @(posedge clk) begin
    if (p_req_valid) begin
      c_req_we    <= p_req_we;
      c_req_addr  <= p_req_addr[CA_W-1:0];
      c_req_wdata <= p_req_wdata;
      c_req_tag   <= p_req_tag;
    end
  end

  // Response multiplexer.
  logic              mux_we;
  logic [DATA_W-1:0] mux_rdata;
  logic [TAG_W-1:0]  mux_tag;

  always_comb begin
    mux_we    = 1'b0;
    mux_rdata = '0;
    mux_tag   = '0;
    for (int unsigned c = 0; c < FANOUT; c++) begin
      if (c_rsp_valid[c]) begin
        mux_we    = mux_we | c_rsp_we[c];
        mux_rdata = mux_rdata | c_rsp_rdata[c];
        mux_tag   = mux_tag | c_rsp_tag[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_rsp_valid <= 1'b0;
    else        p_rsp_valid <= |c_rsp_valid;
  end

  always_ff @(posedge clk) begin
    if (|c_rsp_valid) begin
      p_rsp_we    <= mux_we;
      p_rsp_rdata <= mux_rdata;
      p_rsp_tag   <= mux_tag;
    end
  end

  // A single-port block never has two children answering at once.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(c_rsp_valid))
    else $error("htree_node: several child responses in one cycle");

endmodule
