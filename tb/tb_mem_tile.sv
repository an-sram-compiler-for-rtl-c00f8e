// Self-checking test of mem_tile: the tile at (0,0) of a 2x1 mesh, with a
// 2 KB block of 16x64 subarrays (16 subarrays, block latency 5). The test
// plays the core above the tile and the neighbouring tile on the east link.
//  - Core writes and reads of its own block: data and a latency of 5.
//  - A core request for block 1 leaves on the east link as a VC0 flit
//    one cycle later; the test answers with a VC1 flit that reaches the
//    core one cycle after it enters.
//  - Request flits entering on the east link are executed on the block,
//    and their responses leave on the east link on VC1, after
//    1 (router) + 5 (block) + 1 (queue) + 1 (router) cycles.
module tb_mem_tile;
  import sram_pkg::*;
  localparam int unsigned BA_W = 9, DW = 32, TW = 4;
  localparam int unsigned FW = 1 + 1 + 1 + 1 + 2 + TW + BA_W + DW;   // X_W = Y_W = 1
  localparam int unsigned LAT = 5;

  logic            clk = 0, rst_n = 0;
  logic            core_req_valid, core_req_ready, core_req_we;
  logic [BA_W:0]   core_req_addr;
  logic [DW-1:0]   core_req_wdata, core_rsp_rdata;
  logic [TW-1:0]   core_req_tag, core_rsp_tag;
  logic            core_rsp_valid, core_rsp_we;
  logic            link_in_valid [4];
  logic            link_in_vc    [4];
  logic [FW-1:0]   link_in_flit  [4];
  logic [1:0]      link_in_ready [4];
  logic            link_out_valid[4];
  logic            link_out_vc   [4];
  logic [FW-1:0]   link_out_flit [4];
  logic [1:0]      link_out_ready[4];
  int checks = 0, failures = 0;
  longint cycle = 0;
  logic [DW-1:0] model [512];

  mem_tile #(.MESH_X(2), .MESH_Y(1), .MY_X(0), .MY_Y(0), .BLOCK_BYTES(2048),
             .SUB_ROWS(16), .SUB_COLS(64), .DATA_W(DW), .TAG_W(TW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [FW-1:0] mk(input int dx, sx, input logic rsp, we,
                                       input logic [TW-1:0] tag, input logic [BA_W-1:0] a,
                                       input logic [DW-1:0] d);
    return {1'(dx), 1'b0, 1'(sx), 1'b0, rsp, we, tag, a, d};
  endfunction

  task automatic quiet();
    core_req_valid = 0; core_req_we = 0; core_req_addr = '0; core_req_wdata = '0; core_req_tag = '0;
    for (int d = 0; d < 4; d++) begin
      link_in_valid[d] = 0; link_in_vc[d] = 0; link_in_flit[d] = '0; link_out_ready[d] = 2'b11;
    end
  endtask

  // Core access to the local block: one request, wait for its response.
  task automatic local_access(input logic we, input logic [BA_W-1:0] a, input logic [DW-1:0] d);
    longint t0;
    logic [TW-1:0] tag;
    tag = TW'($urandom());
    @(negedge clk);
    core_req_valid = 1; core_req_we = we; core_req_addr = {1'b0, a}; core_req_wdata = d; core_req_tag = tag;
    #1;
    check(core_req_ready, "local request accepted at once");
    t0 = cycle;
    @(negedge clk); quiet();
    while (!core_rsp_valid) @(negedge clk);
    check(cycle - t0 == LAT && core_rsp_tag == tag && core_rsp_we == we && (we || core_rsp_rdata == model[a]),
          $sformatf("local %s addr %0d latency %0d data %h exp %h", we ? "write" : "read", a, cycle - t0,
                    core_rsp_rdata, model[a]));
    if (we) model[a] = d;
  endtask

  initial begin
    quiet();
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i < 40; i++) local_access(1, BA_W'(i * 13), $urandom());
    for (int i = 0; i < 40; i++) local_access(0, BA_W'(i * 13), '0);

    // Core request for block 1.
    @(negedge clk);
    core_req_valid = 1; core_req_we = 0; core_req_addr = {1'b1, 9'd77}; core_req_tag = 4'd11;
    #1;
    check(core_req_ready, "remote request accepted");
    @(negedge clk); quiet();
    #1;
    check(link_out_valid[1] && link_out_vc[1] == 1'b0 &&
          link_out_flit[1] == mk(1, 0, 0, 0, 4'd11, 9'd77, 32'h0), $sformatf("request flit on east link %0d %h", link_out_valid[1], link_out_flit[1]));
    @(negedge clk);
    link_in_valid[1] = 1; link_in_vc[1] = 1; link_in_flit[1] = mk(0, 1, 1, 0, 4'd11, 9'd0, 32'h5a5a1234);
    #1;
    check(link_in_ready[1][1], "east link VC1 ready");
    @(negedge clk); quiet();
    #1;
    check(core_rsp_valid && core_rsp_tag == 4'd11 && core_rsp_rdata == 32'h5a5a1234, "remote response to core");

    // Requests from the east neighbour: a write, then reads.
    for (int i = 0; i < 20; i++) begin
      logic we;
      logic [BA_W-1:0] a;
      logic [DW-1:0] d, exp;
      longint t0;
      we = (i % 2 == 0); a = BA_W'($urandom_range(0, 39) * 13); d = $urandom();
      exp = model[a];
      @(negedge clk); quiet();
      link_in_valid[1] = 1; link_in_vc[1] = 0; link_in_flit[1] = mk(0, 1, 0, we, 4'(i), a, d);
      t0 = cycle;
      @(negedge clk); quiet();
      while (!link_out_valid[1]) @(negedge clk);
      check(cycle - t0 == 1 + LAT + 1 + 1 && link_out_vc[1] == 1'b1 &&
            link_out_flit[1] == mk(1, 0, 1, we, 4'(i), 9'd0, we ? link_out_flit[1][DW-1:0] : exp),
            $sformatf("network %s addr %0d: %0d cycles, flit %h", we ? "write" : "read", a, cycle - t0, link_out_flit[1]));
      if (we) model[a] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
