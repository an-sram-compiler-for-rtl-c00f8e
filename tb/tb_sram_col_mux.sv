// Self-checking test of sram_col_mux (64 columns, 32-bit words): the write
// word is placed on the selected word slot with a matching mask, and the
// read word is taken from the slot selected in the last request cycle,
// and stays so while no new request comes.
module tb_sram_col_mux;
  logic        clk = 0, req_valid;
  logic [0:0]  sel;
  logic [31:0] wdata, rdata;
  logic [63:0] col_wdata, col_wmask, col_rdata;
  int checks = 0, failures = 0;

  sram_col_mux #(.COLS(64), .DATA_W(32)) dut (
    .clk(clk), .req_valid(req_valid), .sel(sel), .wdata(wdata), .col_wdata(col_wdata),
    .col_wmask(col_wmask), .col_rdata(col_rdata), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [0:0] s;
      @(negedge clk);
      s = 1'($urandom_range(0, 1));
      req_valid = 1; sel = s; wdata = $urandom();
      #1;
      checks++;
      if (col_wmask !== (s ? {32'hffffffff, 32'h0} : {32'h0, 32'hffffffff}) ||
          (col_wdata & col_wmask) !== (s ? {wdata, 32'h0} : {32'h0, wdata})) begin
        failures++;
        $display("FAIL write side sel=%0d mask=%h data=%h", s, col_wmask, col_wdata);
      end
      @(negedge clk);
      req_valid = 0; sel = ~s;
      col_rdata = {$urandom(), $urandom()};
      #1;
      checks++;
      if (rdata !== (s ? col_rdata[63:32] : col_rdata[31:0])) begin
        failures++;
        $display("FAIL read side sel=%0d rdata=%h", s, rdata);
      end
      // With no new request the selection holds, whatever sel does.
      @(posedge clk); #1;
      checks++;
      if (rdata !== (s ? col_rdata[63:32] : col_rdata[31:0])) begin
        failures++;
        $display("FAIL selection not held sel=%0d rdata=%h", s, rdata);
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
