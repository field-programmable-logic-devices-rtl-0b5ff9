// fsm_cell: one finite-state-machine cell of the FPLD.
//
// The cell wraps a pla with the flip-flops the published cell adds around it:
// IN input buffers, the TERMS product-term buffers inside the pla, OUT output
// buffers and one feedback flip-flop, 5 + 10 + 6 + 1 = 22 at the default
// sizes. The feedback flip-flop captures PLA output y[OUT-1]; when fb_en is
// high its value replaces the registered input x[IN-1] at the PLA, so the last
// output becomes state that the next evaluation can use. Which output and which
// input the feedback uses, and the static fb_en pin that switches it in, are
// this design's choices: the published cell names the feedback flip-flop but
// not where it connects. With fb_en low the cell is a plain pipelined PLA.
//
// Interface: clk, rst_n (asynchronous, active low, clears every buffer but
// not the personality bits); fb_en; programming port as in pla; x_in -> y_out.
// Timing: y_out follows x_in after three rising edges (input buffer,
// product-term buffer, output buffer). The feedback loop (feedback flip-flop
// -> AND array -> product-term buffer -> OR array) is two cycles long, so a
// state update written in the PLA takes effect every second cycle.
module fsm_cell #(
  parameter int unsigned IN    = fpld_pkg::PLA_IN,
  parameter int unsigned TERMS = fpld_pkg::PLA_TERMS,
  parameter int unsigned OUT   = fpld_pkg::PLA_OUT,
  localparam int unsigned COLS_MAX = (2 * IN > TERMS) ? 2 * IN : TERMS,
  localparam int unsigned AW       = $clog2(COLS_MAX),
  localparam int unsigned DW       = (TERMS > OUT) ? TERMS : OUT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           fb_en,
  // programming port
  input  logic           sel_and,
  input  logic           sel_or,
  input  logic           cas,
  input  logic [AW-1:0]  col_addr,
  input  logic [DW-1:0]  prog_data,
  // logic port
  input  logic [IN-1:0]  x_in,
  output logic [OUT-1:0] y_out
);

  logic [IN-1:0]    x_q;
  logic [IN-1:0]    x_pla;
  logic [TERMS-1:0] z_q;
  logic [OUT-1:0]   y;
  logic             fb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_out <= '0;
      fb_q  <= 1'b0;
    end else begin
      x_q   <= x_in;
      y_out <= y;
      fb_q  <= y[OUT-1];
    end
  end

  always_comb begin
    x_pla = x_q;
    if (fb_en) x_pla[IN-1] = fb_q;
  end

  pla #(.IN(IN), .TERMS(TERMS), .OUT(OUT)) u_pla (
    .clk      (clk),
    .rst_n    (rst_n),
    .sel_and  (sel_and),
    .sel_or   (sel_or),
    .cas      (cas),
    .col_addr (col_addr),
    .prog_data(prog_data),
    .x        (x_pla),
    .z_q      (z_q),
    .y        (y)
  );

endmodule
