// stage_links: fixed wiring between the two switching stages of the die.
//
// When the die is used as the first two stages of a three-stage radix-4 Clos
// network, cells 0..2 (first stage) each act as a 4 x 4 crossbar on inputs
// x0..x3 / outputs y1..y4, and cells 3..5 (second stage) take their inputs
// x0..x3 from first-stage outputs. Each first-stage cell sends one link to
// each second-stage cell and a second link to the second-stage cell in the
// same row, twelve links in all; y0, y5 of the first stage and x4 of the
// second stage are not part of the network. That link pattern follows the
// published drawing of the arrangement; the exact port-to-port order below,
// and the static link_en pin that lets the second-stage cells use their own
// die inputs instead, are this design's choices.
//
// Port order: first-stage cell a sends links j = 0..3 (outputs y[j+1]) to
// second-stage cells b = 0, .., in ascending order, the cell b = a taking two
// consecutive links; second-stage cell b numbers its inputs k = 0..3 the same
// way by source cell. Thus link (a, j) lands on (b, k) with
//   a == b : k = j              a != b : j = (b < a) ? b : b + 1,
//                                        k = (a < b) ? a : a + 1.
//
// Interface: s1_y (outputs of the three first-stage cells), pin_x (die inputs
// of the three second-stage cells), link_en -> s2_x (inputs of the
// second-stage cells). Purely combinational.
module stage_links
  import fpld_pkg::*;
#(
  localparam int unsigned NS    = 3,  // crossbars per stage
  localparam int unsigned RADIX = 4   // ports per crossbar
) (
  input  logic                           link_en,
  input  logic [NS-1:0][PLA_OUT-1:0]     s1_y,
  input  logic [NS-1:0][PLA_IN-1:0]      pin_x,
  output logic [NS-1:0][PLA_IN-1:0]      s2_x
);

  // Source cell of input k of second-stage cell b.
  function automatic int unsigned src_cell(int unsigned b, int unsigned k);
    if (k < b)           return k;
    else if (k <= b + 1) return b;
    else                 return k - 1;
  endfunction

  // Link number at the source cell for input k of second-stage cell b.
  function automatic int unsigned src_link(int unsigned b, int unsigned k);
    int unsigned a;
    a = src_cell(b, k);
    if (a == b)     return k;
    else if (b < a) return b;
    else            return b + 1;
  endfunction

  always_comb begin
    s2_x = pin_x;
    if (link_en) begin
      for (int unsigned b = 0; b < NS; b++) begin
        for (int unsigned k = 0; k < RADIX; k++) begin
          s2_x[b][k] = s1_y[src_cell(b, k)][src_link(b, k) + 1];
        end
      end
    end
  end

endmodule
