// Self-checking test of sram_write_driver with random data and column
// selections: selected columns are driven with data during a write; all
// others read back high and are not enabled.
module tb_sram_write_driver;
  localparam int unsigned COLS = 64;
  logic            we;
  logic [COLS-1:0] sel, din, wen, drv;
  int checks = 0, failures = 0;

  sram_write_driver #(.COLS(COLS)) dut (.we(we), .col_sel(sel), .din(din), .col_wen(wen), .drv_data(drv));

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [COLS-1:0] exp_wen, exp_drv;
      we  = $urandom_range(0, 1) == 1;
      sel = {$urandom(), $urandom()};
      din = {$urandom(), $urandom()};
      #1;
      exp_wen = '0;
      exp_drv = '1;
      for (int c = 0; c < COLS; c++)
        if (we && sel[c]) begin
          exp_wen[c] = 1'b1;
          exp_drv[c] = din[c];
        end
      checks++;
      if (wen !== exp_wen || drv !== exp_drv) begin
        failures++;
        $display("FAIL we=%0d sel=%h din=%h wen=%h drv=%h", we, sel, din, wen, drv);
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
