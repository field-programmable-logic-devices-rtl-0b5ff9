// deserializer: serial-to-parallel converters at the optical inputs.
//
// Each of LANES serial streams is collected into words of RATIO consecutive
// line-rate bits; the first bit of a word lands in bit plane 0. The output is
// organised in bit planes: dout[s][n] is bit s of the current word of stream
// n, so plane s is exactly what bit-slice copy s of the crossbars switches.
// A word is complete in the cycle in which word_en is high (its last bit is
// on din) and appears on dout after that rising edge, where it stays for one
// word time. Four line-rate cycles per word, as published; the bit order and
// the bit-plane layout are this design's choices.
//
// Interface: clk (line rate), rst_n, word_en (from word_phase), din[LANES]
// -> dout[RATIO][LANES].
module deserializer #(
  parameter int unsigned RATIO = 4,
  parameter int unsigned LANES = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        word_en,
  input  logic [LANES-1:0]            din,
  output logic [RATIO-1:0][LANES-1:0] dout
);

  // sr[k]: bit k of the word being collected, for every lane
  logic [RATIO-2:0][LANES-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      dout <= '0;
    end else begin
      for (int k = 0; k < int'(RATIO) - 2; k++) sr[k] <= sr[k+1];
      sr[RATIO-2] <= din;
      if (word_en) dout <= {din, sr};
    end
  end

endmodule
