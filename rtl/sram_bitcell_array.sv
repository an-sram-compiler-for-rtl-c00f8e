// Bit-cell array of an SRAM subarray: ROWS word lines by COLS bit lines.
// Read: the row whose word line is high drives the single-ended bit lines;
// a stored 0 discharges its bit line, a stored 1 leaves it high. With no
// word line high every bit line stays precharged high.
// Write: on the rising clock edge, while a word line and wr_en are high,
// each column whose write driver is enabled (col_wen) takes col_wdata;
// the other cells of the row keep their value.
// The word lines are one-hot (from the row decoder); the array locates
// the active row with an OR-encoder so that it stays a single-port memory
// for synthesis. Cells are not initialised, as in silicon.
module sram_bitcell_array #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,
  input  logic            wr_en,
  input  logic [COLS-1:0] col_wen,
  input  logic [COLS-1:0] col_wdata,
  output logic [COLS-1:0] bl
);
  localparam int unsigned RA_W = $clog2(ROWS);

  logic [COLS-1:0] cells [ROWS];
  logic [RA_W-1:0] row_idx;
  logic            any_wl;

  // One-hot word lines to row index.
  always_comb begin
    row_idx = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (wl[r]) row_idx = row_idx | RA_W'(r);
  end
  assign any_wl = |wl;

  assign bl = any_wl ? cells[row_idx] : '1;

  always_ff @(posedge clk) begin
    if (wr_en && any_wl)
      cells[row_idx] <= (cells[row_idx] & ~col_wen) | (col_wdata & col_wen);
  end

endmodule
