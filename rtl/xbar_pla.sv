// xbar_pla: pipelined PLA of a switch FPLD, used as a statically programmed
// PORTS x PORTS crossbar.
//
// Two pipe_nor_array instances in cascade form the same NOR-NOR PLA as the
// small cells of the logic die (pla), scaled to PORTS inputs, TERMS product
// terms and PORTS outputs, with each array pipelined over STAGES clock
// cycles. Loaded as a crossbar, product term i is input i (its AND row enables
// only ~x_i) and output o is the OR of the terms of the inputs it listens to:
// one enabled term per output gives a permutation, several outputs enabling
// the same term give multicast. Because it is a general PLA the same hardware
// can be loaded with any other sum of products. The 32 x 32 size and three
// cycles per NOR array are the published proposal; TERMS = PORTS is this
// design's reading of "a 32 x 32 PLA".
//
// Interface: clk, rst_n, en (slow-rate enable); programming port as in pla
// (sel_and / sel_or, cas, col_addr, prog_data); x -> y.
// Timing: y follows x after 2 * STAGES enabled edges.
module xbar_pla #(
  parameter int unsigned PORTS  = 32,
  parameter int unsigned TERMS  = 32,
  parameter int unsigned STAGES = 3,
  localparam int unsigned AW    = $clog2(2 * PORTS),
  localparam int unsigned DW    = (TERMS > PORTS) ? TERMS : PORTS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             sel_and,
  input  logic             sel_or,
  input  logic             cas,
  input  logic [AW-1:0]    col_addr,
  input  logic [DW-1:0]    prog_data,
  input  logic [PORTS-1:0] x,
  output logic [PORTS-1:0] y
);

  localparam int unsigned AW_OR = (TERMS > 1) ? $clog2(TERMS) : 1;

  logic [TERMS-1:0] z;

  pipe_nor_array #(.N_IN(PORTS), .N_OUT(TERMS), .DUAL_RAIL(1'b1), .INVERT_OUT(1'b0), .STAGES(STAGES)) u_and (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(sel_and), .cas(cas),
    .col_addr(col_addr), .prog_data(prog_data[TERMS-1:0]), .x(x), .y(z));

  pipe_nor_array #(.N_IN(TERMS), .N_OUT(PORTS), .DUAL_RAIL(1'b0), .INVERT_OUT(1'b1), .STAGES(STAGES)) u_or (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(sel_or), .cas(cas),
    .col_addr(col_addr[AW_OR-1:0]), .prog_data(prog_data[PORTS-1:0]), .x(z), .y(y));

endmodule
