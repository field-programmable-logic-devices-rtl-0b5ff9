// nor_array: one dynamically programmable NOR array (personality matrix P).
//
// Output row i carries y_i = NOR over j of (p_ij AND v_j), where v are the
// vertical lines. The array is made of:
//   * column drivers, which turn the input vector X (N_IN bits) into the
//     vertical lines. With DUAL_RAIL = 1 each input appears twice, true and
//     complemented, in the order x0, ~x0, x1, ~x1, ... (COLS = 2 * N_IN), as in
//     the first array of a PLA; with DUAL_RAIL = 0 the inputs are used as they
//     are (COLS = N_IN), as in the second array;
//   * N_OUT rows (nor_row), each a programmable NOR gate;
//   * output buffers, inverting when INVERT_OUT = 1;
//   * control circuitry and row drivers for programming, one column of P at a
//     time: while SEL selects the array, the column address picks column j and
//     the N_OUT personality bits of that column are on the programming bus; the
//     column-address strobe CAS writes them. Bus bit i goes to row i.
// The structure and the programming sequence follow the published array. The
// write is synchronous (on the rising clock edge while sel and cas are high),
// and a column address beyond COLS writes nothing: both are this design's
// choices.
//
// Interface: clk; sel, cas, col_addr, prog_data (programming); x -> y.
// Timing: y is combinational from x. A write takes effect from the next cycle.
module nor_array #(
  parameter int unsigned N_IN       = 5,
  parameter int unsigned N_OUT      = 10,
  parameter bit          DUAL_RAIL  = 1'b1,
  parameter bit          INVERT_OUT = 1'b0,
  localparam int unsigned COLS      = DUAL_RAIL ? 2 * N_IN : N_IN,
  localparam int unsigned AW        = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic             clk,
  // programming port
  input  logic             sel,
  input  logic             cas,
  input  logic [AW-1:0]    col_addr,
  input  logic [N_OUT-1:0] prog_data,
  // logic port
  input  logic [N_IN-1:0]  x,
  output logic [N_OUT-1:0] y
);

  // ---- column drivers -------------------------------------------------------
  logic [COLS-1:0] v;
  always_comb begin
    for (int j = 0; j < int'(N_IN); j++) begin
      if (DUAL_RAIL) begin
        v[2*j]   = x[j];
        v[2*j+1] = ~x[j];
      end else begin
        v[j] = x[j];
      end
    end
  end

  // ---- control circuitry: column decoder ------------------------------------
  logic [COLS-1:0] col_we;
  always_comb begin
    for (int j = 0; j < int'(COLS); j++) begin
      col_we[j] = sel && cas && (col_addr == AW'(j));
    end
  end

  // ---- rows -----------------------------------------------------------------
  logic [N_OUT-1:0] row;
  for (genvar i = 0; i < N_OUT; i++) begin : g_row
    logic [COLS-1:0] p_unused;
    nor_row #(.COLS(COLS)) u_row (
      .clk   (clk),
      .col_we(col_we),
      .bit_in(prog_data[i]),   // row driver i
      .x     (v),
      .p     (p_unused),
      .z     (row[i])
    );
  end

  // ---- output buffers -------------------------------------------------------
  assign y = INVERT_OUT ? ~row : row;

  // A strobe addressed to this array must name one of its columns.
  a_col_in_range: assert property (@(posedge clk) (sel && cas) |-> (32'(col_addr) < COLS))
    else $error("nor_array: column address %0d out of range", col_addr);

endmodule
