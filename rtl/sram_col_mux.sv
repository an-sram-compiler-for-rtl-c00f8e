// Column multiplexer between a subarray and the DATA_W-bit data bus.
// A subarray row of COLS bits holds COLS/DATA_W words side by side; word w
// occupies columns [w*DATA_W +: DATA_W].
// Write side (combinational): the bus word is copied onto every word slot of
// col_wdata, and col_wmask enables only the columns of the selected word.
// Read side: the word index of a request is registered when req_valid is
// high. One cycle later, when the subarray returns its row, rdata gives
// the selected word.
module sram_col_mux #(
  parameter int unsigned COLS   = 64,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned WPR   = COLS / DATA_W,
  localparam int unsigned SEL_W = (WPR > 1) ? $clog2(WPR) : 1
) (
  input  logic              clk,
  input  logic              req_valid,
  input  logic [SEL_W-1:0]  sel,
  input  logic [DATA_W-1:0] wdata,
  output logic [COLS-1:0]   col_wdata,
  output logic [COLS-1:0]   col_wmask,
  input  logic [COLS-1:0]   col_rdata,
  output logic [DATA_W-1:0] rdata
);
  logic [SEL_W-1:0] sel_q;

  always_comb begin
    for (int unsigned w = 0; w < WPR; w++) begin
      col_wdata[w*DATA_W +: DATA_W] = wdata;
      col_wmask[w*DATA_W +: DATA_W] = (WPR == 1 || sel == SEL_W'(w)) ? '1 : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid) sel_q <= sel;
  end

  always_comb begin
    rdata = col_rdata[0 +: DATA_W];
    for (int unsigned w = 1; w < WPR; w++)
      if (sel_q == SEL_W'(w)) rdata = col_rdata[w*DATA_W +: DATA_W];
  end

  if (COLS % DATA_W != 0) begin : g_bad_width
    $error("COLS must be a multiple of DATA_W");
  end

endmodule
