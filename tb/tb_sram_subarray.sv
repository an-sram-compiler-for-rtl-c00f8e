// Self-checking test of sram_subarray (64x64): random masked writes and
// reads, one request per cycle, compared with a software copy; read data
// and rsp_valid must appear exactly one cycle after the request.
module tb_sram_subarray;
  localparam int unsigned ROWS = 64, COLS = 64;
  logic            clk = 0, rst_n = 0;
  logic            req_valid, req_we, rsp_valid, rsp_we;
  logic [5:0]      req_row;
  logic [COLS-1:0] wdata, wmask, rdata;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  sram_subarray #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_we(req_we), .req_row(req_row),
    .req_wdata(wdata), .req_wmask(wmask), .rsp_valid(rsp_valid), .rsp_we(rsp_we), .rsp_rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    req_valid = 0; req_we = 0; req_row = '0; wdata = '0; wmask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      req_valid = 1; req_we = 1; req_row = 6'(r); wmask = '1;
      wdata = {$urandom(), $urandom()};
      model[r] = wdata;
    end
    for (int i = 0; i < 400; i++) begin
      logic v, w;
      logic [COLS-1:0] exp;
      @(negedge clk);
      v = $urandom_range(0, 3) != 0;
      w = $urandom_range(0, 1) == 1;
      req_valid = v; req_we = w; req_row = 6'($urandom_range(0, ROWS - 1));
      wdata = {$urandom(), $urandom()}; wmask = {$urandom(), $urandom()};
      exp = model[req_row];
      if (v && w) model[req_row] = (model[req_row] & ~wmask) | (wdata & wmask);
      @(posedge clk); #1;
      checks++;
      if (rsp_valid !== v || (v && rsp_we !== w) || (v && !w && rdata !== exp)) begin
        failures++;
        $display("FAIL v=%0d w=%0d row=%0d rsp_valid=%0d rdata=%h exp=%h", v, w, req_row, rsp_valid, rdata, exp);
      end
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
