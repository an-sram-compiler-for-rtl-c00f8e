// Bank of single-ended dynamic sense amplifiers, one per bit line.
// Each amplifier has a precharge phase and an evaluation phase. While EN is
// high, its internal node is discharged and OUT is precharged high. With
// EN low, a discharged bit line (cell storing 0) charges the internal node
// and pulls OUT low. A bit line that stays high (cell storing 1) leaves
// OUT high. OUT keeps the sensed value until the next precharge.
// This model works at clock-cycle level. A cycle with en high precharges,
// and its edge sets out to all ones. A cycle with en low evaluates, and its
// edge loads the bit-line state into out. So read data appears one cycle
// after the word line is raised.
module sram_sense_amp #(
  parameter int unsigned COLS = 64
) (
  input  logic            clk,
  input  logic            en,   // 1: precharge, 0: evaluate
  input  logic [COLS-1:0] bl,
  output logic [COLS-1:0] out
);
  always_ff @(posedge clk) begin
    if (en) out <= '1;
    else    out <= bl;
  end
endmodule
