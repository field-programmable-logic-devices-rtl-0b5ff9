// nor_row: one dynamically programmable NOR gate, i.e. one row of a NOR array.
//
// A row wire runs through COLS cross-point cells. An always-on pull-up holds the
// wire at 1; any cell whose personality bit is 1 and whose vertical input is 1
// pulls it to 0. The row therefore carries the NOR of the enabled inputs,
// z = ~|(p & x). A row with no enabled input stays at 1. This is the published
// circuit; modelling the wired pull-downs as an OR reduction is exact for a
// ratioed NOR gate whose pull-up is weaker than any single pull-down, which the
// transistor sizing of the real cell guarantees.
//
// Programming: the cell of column j is written with bit_in on a rising clock
// edge while col_we[j] is high. col_we is one-hot, driven by the array's column
// decoder. bit_in is this row's line of the programming bus.
//
// Interface: clk, col_we[COLS], bit_in, x[COLS] -> z (combinational), p[COLS].
module nor_row #(
  parameter int unsigned COLS = 10
) (
  input  logic            clk,
  input  logic [COLS-1:0] col_we,
  input  logic            bit_in,
  input  logic [COLS-1:0] x,
  output logic [COLS-1:0] p,
  output logic            z
);

  logic [COLS-1:0] pull_dn;

  for (genvar j = 0; j < COLS; j++) begin : g_cell
    xpoint_cell u_cell (
      .clk    (clk),
      .wr_en  (col_we[j]),
      .bit_in (bit_in),
      .x      (x[j]),
      .p      (p[j]),
      .pull_dn(pull_dn[j])
    );
  end

  // Pull-up PMOS always on; the wire is low when any pull-down conducts.
  assign z = ~(|pull_dn);

endmodule
