// wan_clos_switch: rearrangeable three-stage Clos switch for a wide-area-
// network backbone, built from three switch FPLDs (wan_fpld).
//
// XBARS * PORTS optical channels (1024 at OC-48, 2.488 Gbit/s each, at the
// defaults) enter the first FPLD, whose crossbars each take PORTS of them.
// Between stages the links form a full shuffle: output port j of crossbar a
// in one stage feeds input port a of crossbar j in the next, so every
// first-stage crossbar reaches every middle crossbar once. The three-FPLD
// partition and the 32 crossbars of 32 x 32 per FPLD are the published
// proposal; the exact port order of the shuffle (the standard one) is this
// design's, as is the shared programming bus with a 2-bit FPLD select.
// The optical demultiplexer, multiplexer, amplifiers and the controller that
// computes crossbar settings are outside this module.
//
// Interface: clk (line rate), rst_n; programming: cfg_chip picks the FPLD
// (0..2), the rest as in wan_fpld; ser_in -> ser_out.
// Timing: 3 * (2 * STAGES + 2) * RATIO line cycles from input to output
// (96 at the defaults).
module wan_clos_switch #(
  parameter int unsigned XBARS  = 32,
  parameter int unsigned PORTS  = 32,
  parameter int unsigned RATIO  = 4,
  parameter int unsigned STAGES = 3,
  localparam int unsigned N     = XBARS * PORTS,
  localparam int unsigned ARR_W = $clog2(2 * XBARS * RATIO),
  localparam int unsigned COL_W = $clog2(2 * PORTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        cfg_chip,
  input  logic              cfg_cas,
  input  logic [ARR_W-1:0]  cfg_arr,
  input  logic [COL_W-1:0]  cfg_col,
  input  logic [PORTS-1:0]  cfg_data,
  input  logic [N-1:0]      ser_in,
  output logic [N-1:0]      ser_out
);

  logic [2:0][N-1:0] st_in, st_out;

  assign st_in[0] = ser_in;
  assign ser_out  = st_out[2];

  // full shuffle between stages: (crossbar a, port j) -> (crossbar j, port a)
  // requires XBARS == PORTS for a square Clos network
  for (genvar k = 1; k < 3; k++) begin : g_links
    for (genvar a = 0; a < XBARS; a++) begin : g_a
      for (genvar j = 0; j < PORTS; j++) begin : g_j
        assign st_in[k][j * PORTS + a] = st_out[k-1][a * PORTS + j];
      end
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_stage
    wan_fpld #(.XBARS(XBARS), .PORTS(PORTS), .RATIO(RATIO), .STAGES(STAGES)) u_fpld (
      .clk(clk), .rst_n(rst_n),
      .cfg_cs(cfg_chip == 2'(k)), .cfg_cas(cfg_cas), .cfg_arr(cfg_arr),
      .cfg_col(cfg_col), .cfg_data(cfg_data),
      .ser_in(st_in[k]), .ser_out(st_out[k]));
  end

  if (XBARS != PORTS) begin : g_bad
    $error("wan_clos_switch: a square Clos network needs XBARS == PORTS");
  end

endmodule
