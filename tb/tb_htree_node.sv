// Self-checking test of htree_node (4 children): a parent request appears
// one cycle later on exactly the child named by the top address bits, with
// those bits removed; a child response appears one cycle later on the
// parent port.
module tb_htree_node;
  localparam int unsigned F = 4, AW = 8, DW = 32, TW = 4;
  logic          clk = 0, rst_n = 0;
  logic          p_req_valid, p_req_we, p_rsp_valid, p_rsp_we;
  logic [AW-1:0] p_req_addr;
  logic [DW-1:0] p_req_wdata, p_rsp_rdata;
  logic [TW-1:0] p_req_tag, p_rsp_tag;
  logic [F-1:0]  c_req_valid, c_rsp_valid, c_rsp_we;
  logic          c_req_we;
  logic [AW-3:0] c_req_addr;
  logic [DW-1:0] c_req_wdata;
  logic [TW-1:0] c_req_tag;
  logic [DW-1:0] c_rsp_rdata [F];
  logic [TW-1:0] c_rsp_tag   [F];
  int checks = 0, failures = 0;

  htree_node #(.FANOUT(F), .ADDR_W(AW), .DATA_W(DW), .TAG_W(TW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    p_req_valid = 0; p_req_we = 0; p_req_addr = '0; p_req_wdata = '0; p_req_tag = '0;
    c_rsp_valid = '0; c_rsp_we = '0;
    for (int c = 0; c < F; c++) begin c_rsp_rdata[c] = '0; c_rsp_tag[c] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic v, w, rv;
      logic [AW-1:0] a;
      logic [DW-1:0] d, rd;
      logic [TW-1:0] t, rt;
      int rc;
      @(negedge clk);
      v = $urandom_range(0, 3) != 0; w = $urandom_range(0, 1) == 1;
      a = AW'($urandom()); d = $urandom(); t = TW'($urandom());
      p_req_valid = v; p_req_we = w; p_req_addr = a; p_req_wdata = d; p_req_tag = t;
      rv = $urandom_range(0, 1) == 1; rc = $urandom_range(0, F - 1);
      rd = $urandom(); rt = TW'($urandom());
      c_rsp_valid = '0; c_rsp_we = '0;
      for (int c = 0; c < F; c++) begin c_rsp_rdata[c] = $urandom(); c_rsp_tag[c] = TW'($urandom()); end
      if (rv) begin
        c_rsp_valid[rc] = 1'b1; c_rsp_we[rc] = w; c_rsp_rdata[rc] = rd; c_rsp_tag[rc] = rt;
      end
      @(posedge clk); #1;
      check(c_req_valid == (v ? F'(1) << a[AW-1:AW-2] : '0), "child valid");
      if (v) check(c_req_addr == a[AW-3:0] && c_req_wdata == d && c_req_tag == t && c_req_we == w,
                   "child request fields");
      check(p_rsp_valid == rv, "parent response valid");
      if (rv) check(p_rsp_rdata == rd && p_rsp_tag == rt && p_rsp_we == w, "parent response fields");
    end
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
