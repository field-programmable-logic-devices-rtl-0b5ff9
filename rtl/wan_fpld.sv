// wan_fpld: one switch FPLD of the three-stage optical packet switch.
//
// The FPLD switches XBARS * PORTS bit-serial optical streams (1024 at the
// defaults) through XBARS crossbars of PORTS x PORTS. To run the crossbars at
// a quarter of the line rate every input stream is deserialized into words of
// RATIO bits; bit s of every word of the streams of crossbar b goes through
// bit-slice copy (b, s) of that crossbar, so each crossbar exists RATIO times,
// and the output words are serialized again. A word_phase counter marks the
// word boundaries; all crossbar pipelines advance once per word.
// All of this (32 crossbars of 32 x 32 per FPLD, 4-bit deserialization, four
// copies of each crossbar, three cycles per NOR array) is the published
// proposal. The stream numbering (stream b*PORTS + p is port p of crossbar b),
// the programming address map and the single clock with a word enable are
// this design's. The four copies of a crossbar are programmed separately; to
// switch whole streams they must hold the same personality.
//
// Programming (when cfg_cs is high): cfg_arr = 2 * (b * RATIO + s) + plane
// selects the AND (plane 0) or OR (plane 1) array of copy s of crossbar b;
// cfg_col, cfg_data and cfg_cas as in pla. 2 * XBARS * RATIO arrays.
//
// Interface: clk (line rate), rst_n (asynchronous, active low; also aligns the
// word boundary: the first cycle after reset is bit 0 of a word), programming
// port, ser_in -> ser_out.
// Timing: bit k of a word leaves (2 * STAGES + 2) * RATIO line cycles after
// it arrived: 32 cycles, 8 word times, at the defaults.
module wan_fpld #(
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
  input  logic              cfg_cs,
  input  logic              cfg_cas,
  input  logic [ARR_W-1:0]  cfg_arr,
  input  logic [COL_W-1:0]  cfg_col,
  input  logic [PORTS-1:0]  cfg_data,
  input  logic [N-1:0]      ser_in,
  output logic [N-1:0]      ser_out
);

  logic word_en;
  logic [((RATIO > 1) ? $clog2(RATIO) : 1)-1:0] phase_unused;

  word_phase #(.RATIO(RATIO)) u_phase (
    .clk(clk), .rst_n(rst_n), .phase(phase_unused), .word_en(word_en));

  // bit planes of the words of every stream: plane[s][n] = bit s of stream n
  logic [RATIO-1:0][N-1:0] w_in, w_out;

  deserializer #(.RATIO(RATIO), .LANES(N)) u_des (
    .clk(clk), .rst_n(rst_n), .word_en(word_en), .din(ser_in), .dout(w_in));
  serializer #(.RATIO(RATIO), .LANES(N)) u_ser (
    .clk(clk), .rst_n(rst_n), .word_en(word_en), .din(w_out), .dout(ser_out));

  for (genvar b = 0; b < XBARS; b++) begin : g_xbar
    for (genvar s = 0; s < RATIO; s++) begin : g_slice
      logic sel_and, sel_or;

      assign sel_and = cfg_cs && (cfg_arr == ARR_W'(2 * (b * RATIO + s)));
      assign sel_or  = cfg_cs && (cfg_arr == ARR_W'(2 * (b * RATIO + s) + 1));

      xbar_pla #(.PORTS(PORTS), .TERMS(PORTS), .STAGES(STAGES)) u_xbar (
        .clk(clk), .rst_n(rst_n), .en(word_en),
        .sel_and(sel_and), .sel_or(sel_or), .cas(cfg_cas),
        .col_addr(cfg_col), .prog_data(cfg_data),
        .x(w_in[s][b * PORTS +: PORTS]), .y(w_out[s][b * PORTS +: PORTS]));
    end
  end

endmodule
