// Self-checking test of mem_ni for the tile at (1,2) of a 4x4 mesh with
// 64-word blocks. The test plays the core, the block and the router
// around it and checks, cycle by cycle:
//  - a local request goes straight to the block, tagged local;
//  - a remote request becomes a VC0 flit to the right tile, and waits
//    while the router's VC0 is full;
//  - a request flit from the network reaches the block, tagged remote;
//  - a local and a remote request in the same cycle are both served, in
//    alternating order;
//  - a remote response is sent back on VC1 to the requester, ahead of a
//    new core request;
//  - local and network responses reach the core, local first;
//  - at most RSP_DEPTH remote requests are admitted without responses.
module tb_mem_ni;
  import sram_pkg::*;
  localparam int unsigned BA_W = 6, DW = 32, TW = 4, RD = 4;
  localparam int unsigned BTW = 1 + 2 + 2 + TW;
  localparam int unsigned FW = 2 + 2 + 2 + 2 + 2 + TW + BA_W + DW;

  logic            clk = 0, rst_n = 0;
  logic            core_req_valid, core_req_ready, core_req_we;
  logic [BA_W+3:0] core_req_addr;
  logic [DW-1:0]   core_req_wdata, core_rsp_rdata, blk_req_wdata, blk_rsp_rdata;
  logic [TW-1:0]   core_req_tag, core_rsp_tag;
  logic            core_rsp_valid, core_rsp_we;
  logic            blk_req_valid, blk_req_we, blk_rsp_valid, blk_rsp_we;
  logic [BA_W-1:0] blk_req_addr;
  logic [BTW-1:0]  blk_req_tag, blk_rsp_tag;
  logic            inj_valid, inj_vc, ej_valid, ej_vc;
  logic [FW-1:0]   inj_flit, ej_flit;
  logic [1:0]      inj_ready, ej_ready;
  int checks = 0, failures = 0;

  mem_ni #(.MESH_X(4), .MESH_Y(4), .MY_X(1), .MY_Y(2), .BA_W(BA_W), .DATA_W(DW),
           .TAG_W(TW), .RSP_DEPTH(RD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Flit fields, MSB first: dst_x dst_y src_x src_y is_rsp we tag addr data.
  function automatic logic [FW-1:0] mk(input int dx, dy, sx, sy, input logic rsp, we,
                                       input logic [TW-1:0] tag, input logic [BA_W-1:0] a,
                                       input logic [DW-1:0] d);
    return {2'(dx), 2'(dy), 2'(sx), 2'(sy), rsp, we, tag, a, d};
  endfunction

  task automatic idle();
    core_req_valid = 0; core_req_we = 0; core_req_addr = '0; core_req_wdata = '0; core_req_tag = '0;
    blk_rsp_valid = 0; blk_rsp_we = 0; blk_rsp_rdata = '0; blk_rsp_tag = '0;
    ej_valid = 0; ej_vc = 0; ej_flit = '0; inj_ready = 2'b11;
  endtask

  task automatic core_req(input int blk, input logic we, input logic [BA_W-1:0] a,
                          input logic [DW-1:0] d, input logic [TW-1:0] tag);
    core_req_valid = 1; core_req_we = we; core_req_addr = {4'(blk), a};
    core_req_wdata = d; core_req_tag = tag;
  endtask

  int n_adm;

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Local request: block 9 = (1,2).
    @(negedge clk); idle(); core_req(9, 1, 6'd5, 32'hcafe0001, 4'd3);
    #1;
    check(core_req_ready && blk_req_valid && blk_req_we && blk_req_addr == 6'd5 &&
          blk_req_wdata == 32'hcafe0001 && blk_req_tag == {1'b0, 2'd1, 2'd2, 4'd3} && !inj_valid,
          "local request to the block");

    // Remote request: block 3 = (3,0); first with VC0 full, then free.
    @(negedge clk); idle(); core_req(3, 0, 6'd7, 32'h0, 4'd9); inj_ready = 2'b10;
    #1;
    check(!core_req_ready && !blk_req_valid && !inj_valid, "remote request waits for VC0");
    inj_ready = 2'b11;
    #1;
    check(core_req_ready && inj_valid && inj_vc == 1'b0 &&
          inj_flit == mk(3, 0, 1, 2, 0, 0, 4'd9, 6'd7, 32'h0), "remote request flit");

    // Request flit from (0,0) to this block.
    @(negedge clk); idle(); ej_valid = 1; ej_vc = 0; ej_flit = mk(1, 2, 0, 0, 0, 0, 4'd6, 6'd33, 32'h0);
    #1;
    check(ej_ready[0] && blk_req_valid && !blk_req_we && blk_req_addr == 6'd33 &&
          blk_req_tag == {1'b1, 2'd0, 2'd0, 4'd6}, "network request to the block");

    // Conflict twice in a row: the winners must differ.
    begin
      logic first_remote, second_remote;
      @(negedge clk); idle(); core_req(9, 0, 6'd1, 0, 4'd1);
      ej_valid = 1; ej_vc = 0; ej_flit = mk(1, 2, 3, 3, 0, 0, 4'd2, 6'd2, 32'h0);
      #1;
      first_remote = blk_req_tag[BTW-1];
      check(blk_req_valid && (first_remote ? (ej_ready[0] && !core_req_ready) : (core_req_ready && !ej_ready[0])),
            "one winner in a conflict");
      @(negedge clk);
      #1;
      second_remote = blk_req_tag[BTW-1];
      check(blk_req_valid && second_remote != first_remote, "alternating winner");
    end

    // Remote response from the block goes back on VC1, ahead of a core request.
    @(negedge clk); idle();
    blk_rsp_valid = 1; blk_rsp_we = 0; blk_rsp_rdata = 32'h12345678; blk_rsp_tag = {1'b1, 2'd3, 2'd1, 4'd5};
    @(negedge clk); idle(); core_req(0, 0, 6'd0, 0, 4'd0);
    #1;
    check(inj_valid && inj_vc == 1'b1 && inj_flit == mk(3, 1, 1, 2, 1, 0, 4'd5, 6'd0, 32'h12345678) &&
          !core_req_ready, "response flit ahead of a new request");
    // Let the queued response leave.
    @(negedge clk); idle(); inj_ready = 2'b11;
    repeat (4) @(negedge clk);

    // Local block response and network response in the same cycle.
    idle();
    blk_rsp_valid = 1; blk_rsp_we = 1; blk_rsp_rdata = 32'h0; blk_rsp_tag = {1'b0, 2'd1, 2'd2, 4'd3};
    ej_valid = 1; ej_vc = 1; ej_flit = mk(1, 2, 3, 0, 1, 0, 4'd9, 6'd0, 32'hbeef0007);
    #1;
    check(core_rsp_valid && core_rsp_we && core_rsp_tag == 4'd3 && !ej_ready[1], "local response first");
    @(negedge clk); idle();
    ej_valid = 1; ej_vc = 1; ej_flit = mk(1, 2, 3, 0, 1, 0, 4'd9, 6'd0, 32'hbeef0007);
    #1;
    check(core_rsp_valid && !core_rsp_we && core_rsp_tag == 4'd9 && core_rsp_rdata == 32'hbeef0007 &&
          ej_ready[1], "network response next");

    // Credit limit: two remote requests were admitted so far (one alone,
    // one in the conflict) and one response came back, so one is still
    // inside the block and exactly RD - 1 more may enter.
    @(negedge clk); idle();
    n_adm = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); idle(); ej_valid = 1; ej_vc = 0; ej_flit = mk(1, 2, 0, 1, 0, 0, 4'd1, 6'(i), 0);
      #1;
      if (ej_ready[0]) n_adm++;
    end
    check(n_adm == RD - 1, $sformatf("requests beyond the response queue refused (admitted %0d)", n_adm));
    // Return one response: one slot frees once it is injected.
    @(negedge clk); idle();
    blk_rsp_valid = 1; blk_rsp_tag = {1'b1, 2'd0, 2'd0, 4'd0};
    @(negedge clk); idle();
    @(negedge clk); idle(); ej_valid = 1; ej_vc = 0; ej_flit = mk(1, 2, 0, 1, 0, 0, 4'd1, 6'd0, 0);
    #1;
    check(ej_ready[0], "slot freed by a response");
    @(negedge clk); idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
