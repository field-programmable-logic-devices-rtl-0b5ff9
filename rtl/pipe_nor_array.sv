// pipe_nor_array: pipelined programmable NOR array for a large crossbar PLA.
//
// Same function and programming as nor_array (y_i = NOR of the enabled
// vertical lines, column drivers with optional complements, one column of the
// personality matrix written per CAS strobe), but the COLS columns are cut
// into STAGES segments of at most SEG columns and the row wires are
// registered at each segment boundary. A row's partial pull-down (OR of
// p & v over the columns seen so far) travels through the pipeline while the
// input vector is delayed to meet it, so a signal crosses at most SEG cross-
// points per clock. Three clock cycles to cross a 32-column array is the
// published proposal for a 32 x 32 crossbar; the segment boundaries, the
// delayed-input arrangement and the personality matrix held as an array of row
// words (rather than one cell instance per bit, for simulation speed) are this
// design's.
//
// Interface: clk, rst_n (clears the pipeline, not the personality); en (the
// pipeline advances on rising edges with en high); sel, cas, col_addr,
// prog_data (programming, on any rising edge, independent of en); x -> y.
// Timing: y is registered, STAGES enabled edges after x.
module pipe_nor_array #(
  parameter int unsigned N_IN       = 32,
  parameter int unsigned N_OUT      = 32,
  parameter bit          DUAL_RAIL  = 1'b1,
  parameter bit          INVERT_OUT = 1'b0,
  parameter int unsigned STAGES     = 3,
  localparam int unsigned COLS      = DUAL_RAIL ? 2 * N_IN : N_IN,
  localparam int unsigned AW        = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned SEG       = (COLS + STAGES - 1) / STAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             sel,
  input  logic             cas,
  input  logic [AW-1:0]    col_addr,
  input  logic [N_OUT-1:0] prog_data,
  input  logic [N_IN-1:0]  x,
  output logic [N_OUT-1:0] y
);

  // personality matrix, one word per row
  logic [COLS-1:0] pmat [N_OUT];

  always_ff @(posedge clk) begin
    if (sel && cas) begin
      for (int i = 0; i < int'(N_OUT); i++) pmat[i][col_addr] <= prog_data[i];
    end
  end

  // column drivers
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

  // column mask of each segment
  function automatic logic [COLS-1:0] seg_mask(int unsigned s);
    for (int j = 0; j < int'(COLS); j++)
      seg_mask[j] = (j >= int'(s * SEG)) && (j < int'((s + 1) * SEG));
  endfunction

  // v_d[s]: input lines delayed by s enabled edges; acc[s]: partial pull-down
  // of each row after segment s
  logic [COLS-1:0]  v_d [STAGES];
  logic [N_OUT-1:0] acc [STAGES];

  assign v_d[0] = v;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam logic [COLS-1:0] MASK = seg_mask(s);
    logic [N_OUT-1:0] hit, acc_in;

    always_comb begin
      for (int i = 0; i < int'(N_OUT); i++) hit[i] = |(pmat[i] & v_d[s] & MASK);
    end

    if (s == 0) begin : g_first
      assign acc_in = hit;
    end else begin : g_next
      assign acc_in = acc[s-1] | hit;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)  v_d[s] <= '0;
        else if (en) v_d[s] <= v_d[s-1];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  acc[s] <= '0;
      else if (en) acc[s] <= acc_in;
    end
  end

  // output buffers: the row wire is the NOR, i.e. the complement of the
  // accumulated pull-down
  assign y = INVERT_OUT ? acc[STAGES-1] : ~acc[STAGES-1];

  a_col_in_range: assert property (@(posedge clk) (sel && cas) |-> (32'(col_addr) < COLS))
    else $error("pipe_nor_array: column address %0d out of range", col_addr);

endmodule
