// Self-checking test of sram_block, sized as a 32 KB block of 128x128
// subarrays (16 subarrays, 2 H-tree levels, 4 words per row). Writes a set
// of random addresses, including neighbours in the same subarray row, then
// reads them back with one request per cycle. Checks every read value
// against a software copy, that responses come back in order with their
// tags, and that every access takes exactly 2*2+1 = 5 cycles.
module tb_sram_block;
  localparam int unsigned BYTES = 32768, ROWS = 128, COLS = 128, DW = 32, TW = 4;
  localparam int unsigned AW  = $clog2(BYTES * 8 / DW);
  localparam int unsigned LAT = 5;  // 16 subarrays: two 4-way levels
  localparam int unsigned N   = 600;

  logic          clk = 0, rst_n = 0;
  logic          req_valid, req_we, rsp_valid, rsp_we;
  logic [AW-1:0] req_addr;
  logic [DW-1:0] req_wdata, rsp_rdata;
  logic [TW-1:0] req_tag, rsp_tag;
  int checks = 0, failures = 0;
  longint cycle = 0;

  logic [DW-1:0] model [logic [AW-1:0]];
  logic [AW-1:0] addrs [N];
  // Expected responses, in issue order.
  typedef struct { longint t; logic we; logic [DW-1:0] d; logic [TW-1:0] tag; } exp_t;
  exp_t q [$];

  sram_block #(.BYTES(BYTES), .ROWS(ROWS), .COLS(COLS), .DATA_W(DW), .TAG_W(TW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && rsp_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected response");
      end else begin
        e = q.pop_front();
        if (cycle - e.t != LAT || rsp_we != e.we || rsp_tag != e.tag || (!e.we && rsp_rdata != e.d)) begin
          failures++;
          $display("FAIL lat=%0d we=%0d tag=%0d data=%h exp=%h", cycle - e.t, rsp_we, rsp_tag, rsp_rdata, e.d);
        end
      end
    end
  end

  task automatic issue(input logic we, input logic [AW-1:0] a, input logic [DW-1:0] d);
    exp_t e;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d; req_tag = TW'($urandom());
    e.t = cycle; e.we = we; e.tag = req_tag;
    e.d = we ? '0 : model[a];
    if (we) model[a] = d;
    q.push_back(e);
  endtask

  initial begin
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0; req_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      addrs[i] = (i % 3 == 1) ? addrs[i-1] ^ AW'(1) : AW'($urandom());
      issue(1, addrs[i], $urandom());
    end
    for (int i = 0; i < N; i++) begin
      issue(0, addrs[$urandom_range(0, N - 1)], '0);
      if ($urandom_range(0, 7) == 0) begin @(negedge clk); req_valid = 0; end
    end
    @(negedge clk); req_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d responses missing", q.size()); end
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
