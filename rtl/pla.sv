// pla: NOR-NOR programmable logic array with a registered product-term plane.
//
// Two nor_array instances in cascade compute a sum of products:
//   * the first (AND) array sees every input true and complemented, x0, ~x0,
//     x1, ~x1, ... and its rows are NORs, so a row that enables the
//     complement of each literal it wants is the AND of those literals. Row i
//     is product term z_i. A row with nothing enabled is constant 1; enabling
//     both x_j and ~x_j makes it constant 0;
//   * the product terms are held in a TERMS-bit register (the product-term
//     buffers of each cell);
//   * the second (OR) array NORs the registered product terms it enables, and
//     its inverting output buffers turn that into y_k = OR of the enabled terms.
//     An output with nothing enabled is constant 0.
// Defaults are the published sizes: 5 inputs, 10 product terms, 6 outputs,
// 10 x 10 + 10 x 6 = 160 personality bits. The register between the arrays
// (one NOR array per clock cycle) and the inverting output buffers are this
// design's reading of the published NOR-NOR structure.
//
// Programming: sel_and or sel_or picks the array; col_addr picks a column (an
// input line of that array: 2j / 2j+1 for x_j / ~x_j in the AND array, term j
// in the OR array); prog_data bit i is the personality bit for row i (only the
// low OUT bits are used by the OR array); cas writes on the rising clock edge.
//
// Timing: z_q is registered one cycle after x; y is combinational from z_q.
module pla #(
  parameter int unsigned IN    = fpld_pkg::PLA_IN,
  parameter int unsigned TERMS = fpld_pkg::PLA_TERMS,
  parameter int unsigned OUT   = fpld_pkg::PLA_OUT,
  localparam int unsigned COLS_MAX = (2 * IN > TERMS) ? 2 * IN : TERMS,
  localparam int unsigned AW       = $clog2(COLS_MAX),
  localparam int unsigned DW       = (TERMS > OUT) ? TERMS : OUT
) (
  input  logic             clk,
  input  logic             rst_n,
  // programming port
  input  logic             sel_and,
  input  logic             sel_or,
  input  logic             cas,
  input  logic [AW-1:0]    col_addr,
  input  logic [DW-1:0]    prog_data,
  // logic port
  input  logic [IN-1:0]    x,
  output logic [TERMS-1:0] z_q,
  output logic [OUT-1:0]   y
);

  localparam int unsigned AW_AND = $clog2(2 * IN);
  localparam int unsigned AW_OR  = (TERMS > 1) ? $clog2(TERMS) : 1;

  logic [TERMS-1:0] z;

  nor_array #(.N_IN(IN), .N_OUT(TERMS), .DUAL_RAIL(1'b1), .INVERT_OUT(1'b0)) u_and (
    .clk      (clk),
    .sel      (sel_and),
    .cas      (cas),
    .col_addr (col_addr[AW_AND-1:0]),
    .prog_data(prog_data[TERMS-1:0]),
    .x        (x),
    .y        (z)
  );

  // Product-term buffers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z_q <= '0;
    else        z_q <= z;
  end

  nor_array #(.N_IN(TERMS), .N_OUT(OUT), .DUAL_RAIL(1'b0), .INVERT_OUT(1'b1)) u_or (
    .clk      (clk),
    .sel      (sel_or),
    .cas      (cas),
    .col_addr (col_addr[AW_OR-1:0]),
    .prog_data(prog_data[OUT-1:0]),
    .x        (z_q),
    .y        (y)
  );

endmodule
