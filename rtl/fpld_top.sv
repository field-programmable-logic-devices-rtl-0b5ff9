// fpld_top: the programmable-logic-array FPLD die.
//
// Six FSM cells (fsm_cell), each a 5-input, 10-term, 6-output NOR-NOR PLA
// with input, product-term, output and feedback flip-flops, share one
// programming bus. A programming write presents an array index (cfg_arr =
// 2 * cell + plane, plane 0 = AND array, 1 = OR array), a column address
// (cfg_col, 0..9) and one column of personality bits (cfg_data, bit i for row
// i), and is committed by the column-address strobe cfg_cas on a rising clock
// edge. Twelve arrays of ten columns, 120 writes, load all 960 personality
// bits. The sizes, the single wide bus, the column-at-a-time loading and the
// SEL / CAS / column-address controls follow the published die; the array-
// index encoding that decodes into the twelve SEL lines is this design's.
//
// Cells 0..2 and 3..5 are joined by stage_links, the fixed wiring that lets
// the die act as the first two stages of a radix-4 Clos network (twelve
// inputs on x0..x3 of cells 0..2, twelve outputs on y1..y4 of cells 3..5)
// when link_en is high. With link_en low every cell takes all five inputs
// from its own die inputs.
//
// The die's optical receivers and modulators, and its electrical pads, are
// analog cells from a foundry library and are not modelled: cell_in and
// cell_out are the electrical signals on their logic side.
//
// Interface: clk, rst_n (asynchronous, active low; clears the flip-flops,
// not the personality bits); cfg_* programming port; fb_en (per cell,
// feedback on); link_en; cell_in[c][i] -> cell_out[c][k].
// Timing: three cycles from cell_in to cell_out through one cell; six from a
// first-stage input to a second-stage output with link_en high.
module fpld_top
  import fpld_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  // programming port
  input  logic                                 cfg_cas,
  input  logic [ARR_W-1:0]                     cfg_arr,
  input  logic [COL_W-1:0]                     cfg_col,
  input  logic [PBUS_W-1:0]                    cfg_data,
  // static controls
  input  logic [NUM_CELLS-1:0]                 fb_en,
  input  logic                                 link_en,
  // logic I/O
  input  logic [NUM_CELLS-1:0][PLA_IN-1:0]     cell_in,
  output logic [NUM_CELLS-1:0][PLA_OUT-1:0]    cell_out
);

  localparam int unsigned HALF = NUM_CELLS / 2;

  logic [NUM_CELLS-1:0][PLA_IN-1:0] x_cell;

  // First-stage cells always use their own inputs.
  assign x_cell[HALF-1:0] = cell_in[HALF-1:0];

  stage_links u_links (
    .link_en(link_en),
    .s1_y   (cell_out[HALF-1:0]),
    .pin_x  (cell_in[NUM_CELLS-1:HALF]),
    .s2_x   (x_cell[NUM_CELLS-1:HALF])
  );

  for (genvar c = 0; c < NUM_CELLS; c++) begin : g_cell
    logic sel_and, sel_or;
    assign sel_and = (cfg_arr == ARR_W'(2 * c + int'(PLANE_AND)));
    assign sel_or  = (cfg_arr == ARR_W'(2 * c + int'(PLANE_OR)));

    fsm_cell u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .fb_en    (fb_en[c]),
      .sel_and  (sel_and),
      .sel_or   (sel_or),
      .cas      (cfg_cas),
      .col_addr (cfg_col),
      .prog_data(cfg_data),
      .x_in     (x_cell[c]),
      .y_out    (cell_out[c])
    );
  end

endmodule
