// fpld_system_top: the two pieces of hardware of this design, side by side.
//
//   * u_die, the fabricated six-cell PLA die (fpld_top): programmable logic
//     with 960 personality bits, usable as six independent 5-in / 6-out
//     pipelined PLAs or as the first two stages of a 12-channel radix-4 Clos
//     network;
//   * u_switch, the proposed backbone switch (wan_clos_switch): three switch
//     FPLDs, each with 32 crossbar PLAs of 32 x 32 in four bit-slice copies,
//     switching 1024 serial channels at the line rate.
// The two share nothing but the clock and reset pins of this wrapper; each
// has its own ports, prefixed die_ and sw_. See the modules for timing.
module fpld_system_top
  import fpld_pkg::*;
#(
  parameter int unsigned SW_XBARS  = 32,
  parameter int unsigned SW_PORTS  = 32,
  parameter int unsigned SW_RATIO  = 4,
  parameter int unsigned SW_STAGES = 3,
  localparam int unsigned SW_N     = SW_XBARS * SW_PORTS,
  localparam int unsigned SW_ARR_W = $clog2(2 * SW_XBARS * SW_RATIO),
  localparam int unsigned SW_COL_W = $clog2(2 * SW_PORTS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // logic die
  input  logic                              die_cfg_cas,
  input  logic [ARR_W-1:0]                  die_cfg_arr,
  input  logic [COL_W-1:0]                  die_cfg_col,
  input  logic [PBUS_W-1:0]                 die_cfg_data,
  input  logic [NUM_CELLS-1:0]              die_fb_en,
  input  logic                              die_link_en,
  input  logic [NUM_CELLS-1:0][PLA_IN-1:0]  die_in,
  output logic [NUM_CELLS-1:0][PLA_OUT-1:0] die_out,
  // backbone switch
  input  logic [1:0]                        sw_cfg_chip,
  input  logic                              sw_cfg_cas,
  input  logic [SW_ARR_W-1:0]               sw_cfg_arr,
  input  logic [SW_COL_W-1:0]               sw_cfg_col,
  input  logic [SW_PORTS-1:0]               sw_cfg_data,
  input  logic [SW_N-1:0]                   sw_in,
  output logic [SW_N-1:0]                   sw_out
);

  fpld_top u_die (
    .clk(clk), .rst_n(rst_n),
    .cfg_cas(die_cfg_cas), .cfg_arr(die_cfg_arr), .cfg_col(die_cfg_col), .cfg_data(die_cfg_data),
    .fb_en(die_fb_en), .link_en(die_link_en),
    .cell_in(die_in), .cell_out(die_out));

  wan_clos_switch #(.XBARS(SW_XBARS), .PORTS(SW_PORTS), .RATIO(SW_RATIO), .STAGES(SW_STAGES)) u_switch (
    .clk(clk), .rst_n(rst_n),
    .cfg_chip(sw_cfg_chip), .cfg_cas(sw_cfg_cas), .cfg_arr(sw_cfg_arr),
    .cfg_col(sw_cfg_col), .cfg_data(sw_cfg_data),
    .ser_in(sw_in), .ser_out(sw_out));

endmodule
