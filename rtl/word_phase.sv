// word_phase: word clock of a deserialized datapath.
//
// A switch FPLD runs its serial optical ports at the line rate and its
// crossbars at 1/RATIO of it, on words of RATIO bits. This counter marks the
// last line-rate cycle of every word with word_en; the slow logic is clocked
// by the line-rate clock gated with word_en, so the two rates stay phase-
// locked and need no synchronizers. The rate ratio (4: OC-48 to OC-12) is the
// published one; using one clock with an enable in place of a second clock
// tree is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low: the next cycle is the first
// bit of a word) -> word_en (high in cycle RATIO-1, 2*RATIO-1, ...), phase.
module word_phase #(
  parameter int unsigned RATIO = 4,
  localparam int unsigned PW   = (RATIO > 1) ? $clog2(RATIO) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] phase,
  output logic          word_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         phase <= '0;
    else if (phase == PW'(RATIO - 1))   phase <= '0;
    else                                phase <= phase + 1'b1;
  end

  assign word_en = (phase == PW'(RATIO - 1));

endmodule
