// SRAM subarray: row decoder with word-line drivers, a ROWS x COLS bit-cell
// array, one single-ended dynamic sense amplifier and one write driver per
// column. There is no column multiplexing inside: all COLS bits of a row are
// read or written in parallel (writes are masked per column).
//
// Timing: a request is presented with req_valid for one cycle. In that cycle
// the word line rises and the sense amplifiers evaluate. A write updates the
// row at the rising edge. One cycle later rsp_valid is high, with rsp_rdata
// (the sensed row, for a read) and rsp_we. A new request may come every
// cycle. Sense amplifiers precharge in every cycle without a read.
//
// SUB_TYPE names the placement variant: single tier, bit-line peripherals
// stacked, or all peripherals stacked. All three share one schematic, so
// the parameter is a label only.
module sram_subarray
  import sram_pkg::*;
#(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter sub_type_e   SUB_TYPE = SUB_STF,
  localparam int unsigned RA_W    = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  input  logic            req_we,
  input  logic [RA_W-1:0] req_row,
  input  logic [COLS-1:0] req_wdata,
  input  logic [COLS-1:0] req_wmask,
  output logic            rsp_valid,
  output logic            rsp_we,
  output logic [COLS-1:0] rsp_rdata
);
  logic [ROWS-1:0] wl;
  logic [COLS-1:0] bl, col_wen, drv_data;
  logic            sa_en;

  sram_row_decoder #(.ROWS(ROWS)) u_dec (
    .row_addr(req_row),
    .wl_en   (req_valid),
    .wl      (wl)
  );

  sram_write_driver #(.COLS(COLS)) u_wd (
    .we      (req_valid & req_we),
    .col_sel (req_wmask),
    .din     (req_wdata),
    .col_wen (col_wen),
    .drv_data(drv_data)
  );

  sram_bitcell_array #(.ROWS(ROWS), .COLS(COLS)) u_cells (
    .clk      (clk),
    .wl       (wl),
    .wr_en    (req_valid & req_we),
    .col_wen  (col_wen),
    .col_wdata(drv_data),
    .bl       (bl)
  );

  // EN low (evaluate) only in a read cycle.
  assign sa_en = ~(req_valid & ~req_we);

  sram_sense_amp #(.COLS(COLS)) u_sa (
    .clk(clk),
    .en (sa_en),
    .bl (bl),
    .out(rsp_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_we    <= 1'b0;
    end else begin
      rsp_valid <= req_valid;
      rsp_we    <= req_we;
    end
  end

endmodule
