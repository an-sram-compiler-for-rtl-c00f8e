// Row address decoder and word-line drivers of an SRAM subarray.
// The row address is split into a low and a high field; each field is
// predecoded to a one-hot group, and word line r is raised when the
// enable is high and the predecoded lines of both fields for r are high.
// Exactly one word line is high while wl_en is high, none otherwise.
// Purely combinational: the word line follows the address in the same
// cycle. The two-stage predecode is this design's choice; the subarray
// only requires a decoder plus drivers.
module sram_row_decoder #(
  parameter int unsigned ROWS = 64,
  localparam int unsigned RA_W = $clog2(ROWS)
) (
  input  logic [RA_W-1:0] row_addr,
  input  logic            wl_en,
  output logic [ROWS-1:0] wl
);
  localparam int unsigned LO_W = (RA_W + 1) / 2;
  localparam int unsigned HI_W = RA_W - LO_W;
  localparam int unsigned N_LO = 1 << LO_W;
  localparam int unsigned N_HI = 1 << HI_W;

  logic [N_LO-1:0] pre_lo;
  logic [N_HI-1:0] pre_hi;

  always_comb begin
    for (int unsigned i = 0; i < N_LO; i++)
      pre_lo[i] = (row_addr[LO_W-1:0] == LO_W'(i));
  end

  if (HI_W > 0) begin : g_hi
    always_comb begin
      for (int unsigned j = 0; j < N_HI; j++)
        pre_hi[j] = (row_addr[RA_W-1:LO_W] == HI_W'(j));
    end
  end else begin : g_nohi
    assign pre_hi = 1'b1;
  end

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++)
      wl[r] = wl_en & pre_lo[r % N_LO] & pre_hi[r / N_LO];
  end

endmodule
