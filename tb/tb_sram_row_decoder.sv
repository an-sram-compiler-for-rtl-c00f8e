// Self-checking test of sram_row_decoder: every row address, with the
// word-line enable low and high; the expected word lines are a shifted one.
module tb_sram_row_decoder;
  localparam int unsigned ROWS = 64;
  logic [5:0]      addr;
  logic            en;
  logic [ROWS-1:0] wl;
  int checks = 0, failures = 0;

  sram_row_decoder #(.ROWS(ROWS)) dut (.row_addr(addr), .wl_en(en), .wl(wl));

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < ROWS; a++) begin
        addr = 6'(a);
        en   = e[0];
        #1;
        checks++;
        if (wl !== (e[0] ? (64'd1 << a) : 64'd0)) begin
          failures++;
          $display("FAIL addr=%0d en=%0d wl=%h", a, e, wl);
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
