// fpld_pkg: sizes shared by the programmable-logic-array FPLD.
//
// The FPLD is a die holding six small finite-state-machine cells. Each cell is
// built around a NOR-NOR programmable logic array (PLA) with 5 inputs, 10
// product terms and 6 outputs. The first NOR array sees every input in both
// polarities (10 vertical lines), so it holds 10 x 10 personality bits; the
// second holds 10 x 6. 160 bits per PLA, 960 bits for the die. These numbers
// are the published ones. The packing of the chip-level programming address
// (array index = 2 * cell + plane) is this design's own choice.
package fpld_pkg;

  // PLA geometry
  localparam int unsigned PLA_IN    = 5;            // inputs x0..x4
  localparam int unsigned PLA_TERMS = 10;           // product terms z0..z9
  localparam int unsigned PLA_OUT   = 6;            // outputs y0..y5
  localparam int unsigned AND_COLS  = 2 * PLA_IN;   // x and ~x of each input

  // Die
  localparam int unsigned NUM_CELLS  = 6;                 // FSM cells (PLAs) per die
  localparam int unsigned NUM_ARRAYS = 2 * NUM_CELLS;     // NOR arrays per die
  localparam int unsigned BITS_PER_PLA = PLA_TERMS * AND_COLS + PLA_OUT * PLA_TERMS; // 160
  localparam int unsigned BITS_PER_DIE = NUM_CELLS * BITS_PER_PLA;                   // 960

  // Programming bus: as wide as the tallest column (10 product-term rows).
  localparam int unsigned PBUS_W = PLA_TERMS;
  localparam int unsigned COL_W  = $clog2(AND_COLS);      // 4 bits address 10 columns
  localparam int unsigned ARR_W  = $clog2(NUM_ARRAYS);    // 4 bits address 12 arrays

  // Which of the two NOR arrays of a PLA a programming write goes to.
  typedef enum logic {
    PLANE_AND = 1'b0,   // first NOR array (product terms)
    PLANE_OR  = 1'b1    // second NOR array (sum terms / outputs)
  } plane_e;

  // One programming write as it travels on the chip's programming bus.
  typedef struct packed {
    logic              cas;    // column-address strobe: write when high
    logic [ARR_W-1:0]  arr;    // NOR array index: {cell, plane}
    logic [COL_W-1:0]  col;    // column of the personality matrix
    logic [PBUS_W-1:0] data;   // one column of personality bits, row 0 in bit 0
  } prog_word_t;

endpackage
