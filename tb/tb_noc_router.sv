// Self-checking test of noc_router at mesh position (1,1) of a 4x4 mesh.
// All five inputs send random flits on random VCs to random destinations
// while every output applies random back-pressure per VC. Checks: every
// flit leaves on the port that X-then-Y routing names, on its own VC,
// exactly once; flits from one input VC to one output keep their order;
// nothing leaves on a VC whose receiver is not ready; a lone flit crosses
// the router in one cycle; everything is delivered at the end.
module tb_noc_router;
  import sram_pkg::*;
  localparam int unsigned FW = 16;   // dst_x(2) dst_y(2) payload(12)
  logic          clk = 0, rst_n = 0;
  logic          in_valid  [NUM_PORTS];
  logic          in_vc     [NUM_PORTS];
  logic [FW-1:0] in_flit   [NUM_PORTS];
  logic [1:0]    in_ready  [NUM_PORTS];
  logic          out_valid [NUM_PORTS];
  logic          out_vc    [NUM_PORTS];
  logic [FW-1:0] out_flit  [NUM_PORTS];
  logic [1:0]    out_ready [NUM_PORTS];
  int checks = 0, failures = 0;
  int sent = 0, recvd = 0, stalls = 0;
  int outstanding [logic [11:0]];       // payload -> expected output port
  int last_seq [NUM_PORTS][2][NUM_PORTS];

  noc_router #(.X_W(2), .Y_W(2), .MY_X(1), .MY_Y(1), .FLIT_W(FW), .BUF_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  // Expected output, worked out from the destination alone.
  function automatic int exp_port(input logic [1:0] dx, input logic [1:0] dy);
    if (dx > 1) return 2;       // east
    if (dx < 1) return 4;       // west
    if (dy > 1) return 3;       // south
    if (dy < 1) return 1;       // north
    return 0;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic phase_random;
  int   seq [NUM_PORTS][2];

  // Sources: hold a flit until it is accepted.
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (in_valid[p] && in_ready[p][in_vc[p]]) begin
          sent++;
          outstanding[in_flit[p][11:0]] = exp_port(in_flit[p][15:14], in_flit[p][13:12]);
          in_valid[p] <= 1'b0;
        end
      end
    end
  end

  // Sinks.
  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (out_valid[o] && !out_ready[o][out_vc[o]]) check(0, "flit sent to a full VC");
        if (out_valid[o] && out_ready[o][out_vc[o]]) begin
          logic [11:0] pl;
          int ip, s;
          pl = out_flit[o][11:0];
          ip = int'(pl[11:9]);
          s  = int'(pl[7:0]);
          recvd++;
          check(outstanding.exists(pl) && outstanding[pl] == o, $sformatf("route of flit %h at port %0d", pl, o));
          check(out_vc[o] == pl[8], "virtual channel kept");
          check(s > last_seq[ip][pl[8]][o], "order within an input VC");
          last_seq[ip][pl[8]][o] = s;
          outstanding.delete(pl);
        end
      end
    end
  end

  always @(negedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_ready[o] = phase_random ? 2'($urandom()) : 2'b11;
      if (out_ready[o] != 2'b11) stalls++;
    end
  end

  task automatic offer(input int p, input logic vc, input logic [1:0] dx, input logic [1:0] dy);
    in_vc[p]   = vc;
    in_flit[p] = {dx, dy, 3'(p), vc, 8'(seq[p][vc])};
    seq[p][vc]++;
    in_valid[p] = 1'b1;
  endtask

  initial begin
    phase_random = 0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_valid[p] = 0; in_vc[p] = 0; in_flit[p] = '0;
      seq[p][0] = 1; seq[p][1] = 1;
      for (int v = 0; v < 2; v++) for (int o = 0; o < NUM_PORTS; o++) last_seq[p][v][o] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Single-flit latency: accepted at one edge, on the output the next cycle.
    @(negedge clk);
    offer(4, 0, 2'd3, 2'd1);          // from west, goes east
    @(posedge clk); #1;
    check(out_valid[2] && out_flit[2][15:14] == 2'd3, "one-cycle hop");
    repeat (3) @(posedge clk);
    // Random traffic with back-pressure.
    phase_random = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++)
        if (!in_valid[p] && $urandom_range(0, 2) == 0 && seq[p][0] < 250 && seq[p][1] < 250) begin
          logic [1:0] dx, dy;
          dx = 2'($urandom()); dy = 2'($urandom());
          offer(p, 1'($urandom()), dx, dy);
        end
    end
    @(negedge clk);
    phase_random = 0;
    repeat (100) @(posedge clk);
    check(outstanding.size() == 0 && sent == recvd && sent > 500, $sformatf("all delivered sent=%0d recvd=%0d", sent, recvd));
    check(stalls > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
