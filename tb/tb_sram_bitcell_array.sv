// Self-checking test of sram_bitcell_array: random masked writes through
// one-hot word lines, reads compared with a software copy of the cells,
// and all bit lines high when no word line is raised.
module tb_sram_bitcell_array;
  localparam int unsigned ROWS = 16, COLS = 32;
  logic            clk = 0;
  logic [ROWS-1:0] wl;
  logic            wr_en;
  logic [COLS-1:0] wen, wdata, bl;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  sram_bitcell_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .wl(wl), .wr_en(wr_en), .col_wen(wen), .col_wdata(wdata), .bl(bl));
  always #5 clk = ~clk;

  initial begin
    wl = '0; wr_en = 0; wen = '0; wdata = '0;
    // Fill every row.
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wl = ROWS'(1) << r; wr_en = 1; wen = '1; wdata = $urandom();
      model[r] = wdata;
    end
    for (int i = 0; i < 300; i++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, ROWS - 1);
      wl = ROWS'(1) << r;
      wr_en = $urandom_range(0, 1) == 1;
      wen = $urandom(); wdata = $urandom();
      #1;
      checks++;
      if (bl !== model[r]) begin
        failures++;
        $display("FAIL read row %0d bl=%h exp=%h", r, bl, model[r]);
      end
      if (wr_en) model[r] = (model[r] & ~wen) | (wdata & wen);
    end
    @(negedge clk);
    wl = '0; wr_en = 0;
    #1;
    checks++;
    if (bl !== '1) begin failures++; $display("FAIL idle bit lines %h", bl); end
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
