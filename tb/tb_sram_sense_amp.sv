// Self-checking test of sram_sense_amp: a precharge cycle sets every output
// high; an evaluation cycle makes each output follow its bit line (a
// discharged line reads 0); outputs hold until the next edge.
module tb_sram_sense_amp;
  localparam int unsigned COLS = 64;
  logic            clk = 0;
  logic            en;
  logic [COLS-1:0] bl, out;
  int checks = 0, failures = 0;

  sram_sense_amp #(.COLS(COLS)) dut (.clk(clk), .en(en), .bl(bl), .out(out));
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 100; i++) begin
      logic [COLS-1:0] exp;
      @(negedge clk);
      en = $urandom_range(0, 1) == 1;
      bl = {$urandom(), $urandom()};
      exp = en ? '1 : bl;
      @(posedge clk);
      #1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL en=%0d bl=%h out=%h", en, bl, out);
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
