// End-to-end test of sram_array: a 4x4 mesh of tiles, each with a 2 KB
// block of 16x64 subarrays (block latency 5), shallow buffers (2 flits per
// router VC, 4 response slots per tile) so that congestion shows quickly.
// All 16 ports act as cores.
//  A. Quiet single accesses from several cores to every block: data, and a
//     latency of exactly 5 cycles locally and 5 + 2*hops + 3 cycles across
//     the mesh.
//  B. All cores at once: random reads and writes, half of them to one hot
//     block. Each core owns the words whose low 4 address bits equal its
//     number and writes only those, so a software copy gives every read
//     value.
//  C. All cores read random words anywhere.
// The test counts how often each mechanism of the design occurs (local and
// remote block accesses, block-port conflicts, refusals for lack of
// response slots, router back-pressure, responses overtaking requests at
// injection, local-versus-network response collisions, corner-to-corner
// routes) and fails if any never happens.
module tb_sram_array;
  import sram_pkg::*;
  localparam int unsigned MX = 4, MY = 4, NT = MX * MY;
  localparam int unsigned BB = 2048, SR = 16, SC = 64, DW = 32, TW = 4;
  localparam int unsigned BA_W = 9, GA_W = 13;
  localparam int unsigned LAT = 5;     // 16 subarrays: two 4-way levels

  logic            clk = 0, rst_n = 0;
  logic            core_req_valid [NT];
  logic            core_req_ready [NT];
  logic            core_req_we    [NT];
  logic [GA_W-1:0] core_req_addr  [NT];
  logic [DW-1:0]   core_req_wdata [NT];
  logic [TW-1:0]   core_req_tag   [NT];
  logic            core_rsp_valid [NT];
  logic            core_rsp_we    [NT];
  logic [DW-1:0]   core_rsp_rdata [NT];
  logic [TW-1:0]   core_rsp_tag   [NT];

  sram_array #(.MESH_X(MX), .MESH_Y(MY), .BLOCK_BYTES(BB), .SUB_ROWS(SR), .SUB_COLS(SC),
               .DATA_W(DW), .TAG_W(TW), .BUF_DEPTH(2), .RSP_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
      if (failures >= 10) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // ---- Mechanism counters ---------------------------------------------
  int n_local [NT], n_remote [NT], n_conflict [NT], n_credit [NT], n_bp [NT], n_rsp_first [NT], n_rsp_clash [NT];
  int max_hops = 0;

  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      localparam int T = y * MX + x;
      always @(posedge clk) if (rst_n) begin
        if (dut.g_y[y].g_x[x].u_tile.u_ni.grant_local)  n_local[T]++;
        if (dut.g_y[y].g_x[x].u_tile.u_ni.grant_remote) n_remote[T]++;
        if (dut.g_y[y].g_x[x].u_tile.u_ni.cand_local && dut.g_y[y].g_x[x].u_tile.u_ni.grant_remote)
          n_conflict[T]++;
        // Router buffers: a head flit blocked by a full next buffer; a
        // request for this block held back for lack of response slots; a
        // response waiting while a local response uses the core port.
        for (int q = 0; q < 10; q++) begin
          int o;
          o = int'(dut.g_y[y].g_x[x].u_tile.u_router.route[q]);
          if (dut.g_y[y].g_x[x].u_tile.u_router.count[q] != 0) begin
            if (!dut.g_y[y].g_x[x].u_tile.u_router.out_ready[o][q % 2]) n_bp[T]++;
            if (o == 0 && q % 2 == 0 && !dut.g_y[y].g_x[x].u_tile.u_ni.credit_ok) n_credit[T]++;
            if (o == 0 && q % 2 == 1 && dut.g_y[y].g_x[x].u_tile.u_ni.local_rsp) n_rsp_clash[T]++;
          end
        end
        if (dut.g_y[y].g_x[x].u_tile.u_ni.inj_rsp && dut.g_y[y].g_x[x].u_tile.u_ni.core_req_valid &&
            !dut.g_y[y].g_x[x].u_tile.u_ni.core_local)
          n_rsp_first[T]++;
      end
    end
  end

  // ---- Core models ------------------------------------------------------
  logic [DW-1:0] model [logic [GA_W-1:0]];
  typedef struct {
    logic            busy;
    logic            we;
    logic [GA_W-1:0] addr;
    logic [DW-1:0]   exp;
    longint          t0;
    int              want_lat;   // -1: do not check
  } slot_t;
  slot_t slots [NT][1 << TW];
  int    outstanding = 0, issued = 0, answered = 0;

  function automatic int hops(input int a, input int b);
    int dx, dy;
    dx = (a % MX) - (b % MX);
    dy = (a / MX) - (b / MX);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  function automatic int free_tag(input int c);
    for (int t = 0; t < (1 << TW); t++) if (!slots[c][t].busy) return t;
    return -1;
  endfunction

  // Responses.
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NT; c++) if (core_rsp_valid[c]) begin
      slot_t s;
      s = slots[c][core_rsp_tag[c]];
      answered++;
      check(s.busy, $sformatf("core %0d: response for idle tag %0d", c, core_rsp_tag[c]));
      if (s.busy) begin
        check(core_rsp_we[c] == s.we && (s.we || core_rsp_rdata[c] == s.exp),
              $sformatf("core %0d addr %h: data %h exp %h", c, s.addr, core_rsp_rdata[c], s.exp));
        if (s.want_lat >= 0)
          check(cycle - s.t0 == longint'(s.want_lat),
                $sformatf("core %0d addr %h: latency %0d exp %0d", c, s.addr, cycle - s.t0, s.want_lat));
        slots[c][core_rsp_tag[c]].busy = 1'b0;
        outstanding--;
      end
    end
  end

  // Requests: a request stays on the port until it is accepted.
  logic          pend     [NT];
  slot_t         pend_s   [NT];
  int            pend_tag [NT];

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NT; c++) if (core_req_valid[c] && core_req_ready[c]) begin
      int h;
      slot_t s;
      s = pend_s[c];
      h = hops(c, int'(s.addr[GA_W-1 -: 4]));
      if (h > max_hops) max_hops = h;
      s.t0 = cycle;
      if (s.we) model[s.addr] = core_req_wdata[c];
      slots[c][pend_tag[c]] = s;
      pend[c] = 1'b0;
      issued++;
    end
  end

  task automatic offer(input int c, input logic we, input logic [GA_W-1:0] a, input int want_lat);
    int t;
    t = free_tag(c);
    if (t < 0 || pend[c]) return;
    pend[c] = 1'b1;
    pend_tag[c] = t;
    pend_s[c].busy = 1'b1; pend_s[c].we = we; pend_s[c].addr = a;
    pend_s[c].exp = model.exists(a) ? model[a] : '0;
    pend_s[c].want_lat = want_lat;
    core_req_we[c] = we; core_req_addr[c] = a; core_req_wdata[c] = $urandom(); core_req_tag[c] = TW'(t);
    outstanding++;
  endtask

  // Drive the ports from the pending requests at every negative edge.
  always @(negedge clk) begin
    for (int c = 0; c < NT; c++) core_req_valid[c] = pend[c];
  end

  task automatic wait_idle();
    int guard;
    guard = 0;
    while ((outstanding != 0 || issued != answered) && guard < 2000) begin @(negedge clk); guard++; end
    check(outstanding == 0, "all requests answered");
    if (outstanding != 0) begin
      // A lost request never comes back: stop here.
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  task automatic single(input int c, input logic we, input logic [GA_W-1:0] a);
    int blk;
    blk = int'(a[GA_W-1 -: 4]);
    @(negedge clk);
    offer(c, we, a, (blk == c) ? LAT : LAT + 2 * hops(c, blk) + 3);
    core_req_valid[c] = pend[c];
    wait_idle();
  endtask

  initial begin
    for (int c = 0; c < NT; c++) begin
      core_req_valid[c] = 0; core_req_we[c] = 0; core_req_addr[c] = '0; core_req_wdata[c] = '0;
      core_req_tag[c] = '0; pend[c] = 0; pend_tag[c] = 0;
      for (int t = 0; t < (1 << TW); t++) slots[c][t].busy = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // A. Quiet accesses: cores 0, 5 and 15 to every block, write then read.
    foreach (slots[c]) begin
      if (c == 0 || c == 5 || c == 15)
        for (int b = 0; b < NT; b++) begin
          logic [GA_W-1:0] a;
          a = {4'(b), 5'($urandom()), 4'(c)};
          single(c, 1, a);
          single(c, 0, a);
        end
    end

    // B. All cores, random mix, one hot block.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int c = 0; c < NT; c++) begin
        if (!pend[c] && $urandom_range(0, 3) != 0) begin
          logic [3:0] blk;
          logic [GA_W-1:0] a;
          blk = ($urandom_range(0, 1) == 0) ? 4'd5 : 4'($urandom());
          a = {blk, 5'($urandom_range(0, 7)), 4'(c)};
          offer(c, !model.exists(a) || $urandom_range(0, 1) == 1, a, -1);
        end
        core_req_valid[c] = pend[c];
      end
    end
    wait_idle();

    // C. Everyone reads anything that was written.
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      for (int c = 0; c < NT; c++) begin
        if (!pend[c] && $urandom_range(0, 1) == 0) begin
          logic [GA_W-1:0] a;
          a = {4'($urandom()), 5'($urandom_range(0, 7)), 4'($urandom())};
          if (model.exists(a)) offer(c, 1'b0, a, -1);
        end
        core_req_valid[c] = pend[c];
      end
    end
    wait_idle();

    begin
      int s_local = 0, s_remote = 0, s_conf = 0, s_credit = 0, s_bp = 0, s_first = 0, s_clash = 0;
      for (int t = 0; t < NT; t++) begin
        s_local += n_local[t]; s_remote += n_remote[t]; s_conf += n_conflict[t]; s_credit += n_credit[t];
        s_bp += n_bp[t]; s_first += n_rsp_first[t]; s_clash += n_rsp_clash[t];
      end
      $display("requests %0d: local %0d, remote %0d, port conflicts %0d, response-slot refusals %0d,",
               issued, s_local, s_remote, s_conf, s_credit);
      $display("  router back-pressure %0d, responses ahead of requests %0d, response collisions %0d, max hops %0d",
               s_bp, s_first, s_clash, max_hops);
      check(s_local > 0, "local accesses happened");
      check(s_remote > 0, "remote accesses happened");
      check(s_conf > 0, "block port conflicts happened");
      check(s_credit > 0, "response-slot refusals happened");
      check(s_bp > 0, "router back-pressure happened");
      check(s_first > 0, "responses injected ahead of requests");
      check(s_clash > 0, "local and network responses collided");
      check(max_hops == 6, "corner-to-corner routes used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
