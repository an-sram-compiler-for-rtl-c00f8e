// Write drivers of an SRAM subarray, one per bit line.
// During a write (we high), every column selected by col_sel drives its
// data bit onto the bit line and is flagged in col_wen for the cells.
// All other columns, and every column outside a write, are not driven
// and read back as precharged high on drv_data. Combinational.
module sram_write_driver #(
  parameter int unsigned COLS = 64
) (
  input  logic            we,
  input  logic [COLS-1:0] col_sel,
  input  logic [COLS-1:0] din,
  output logic [COLS-1:0] col_wen,
  output logic [COLS-1:0] drv_data
);
  assign col_wen  = we ? col_sel : '0;
  assign drv_data = (din & col_wen) | ~col_wen;
endmodule
