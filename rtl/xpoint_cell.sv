// xpoint_cell: one programmable cross-point of a NOR array.
//
// The cell is a single bit of static configuration memory (the personality bit
// P_ij) that gates a pull-down on the horizontal row wire. When P_ij = 1 and the
// vertical input X_j = 1 the cell pulls the row to 0; otherwise it leaves the
// row alone. The row itself (an always-on pull-up shared by all cells of the
// row) is in nor_row, which turns the wired pull-downs into a NOR.
//
// In silicon the bit is a five-transistor SRAM cell written through one pass
// transistor, and the pull-down is an enable transistor in series with a pull-
// down transistor; that structure follows the published design. Here the bit is
// a clocked flip-flop written on the rising clock edge while wr_en is high (the
// Row_Enable line of the SRAM cell) with the value on bit_in (its BIT line):
// a synchronous write is this design's choice. The bit has no reset, like the
// SRAM it stands for: it must be programmed before the array is used.
//
// Interface: clk, wr_en, bit_in (write side); x (array input), pull_dn (to the
// row wire), p (stored bit, for observation). pull_dn is combinational from x.
module xpoint_cell (
  input  logic clk,
  input  logic wr_en,
  input  logic bit_in,
  input  logic x,
  output logic p,
  output logic pull_dn
);

  always_ff @(posedge clk) begin
    if (wr_en) p <= bit_in;
  end

  // Enable transistor (gate = P_ij) in series with the pull-down (gate = X_j).
  assign pull_dn = p & x;

endmodule
