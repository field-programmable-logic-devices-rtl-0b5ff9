// serializer: parallel-to-serial converters at the optical outputs.
//
// On a rising edge with word_en high it loads one RATIO-bit word per lane,
// given in bit planes (din[s][n] = bit s of the word of lane n); dout then
// sends bit plane 0, 1, ... one per line-rate cycle, starting in the cycle
// after the load. Four line-rate cycles per word, as published; the bit order
// matches deserializer and the bit-plane layout is this design's choice.
//
// Interface: clk (line rate), rst_n, word_en (from word_phase),
// din[RATIO][LANES] -> dout[LANES].
module serializer #(
  parameter int unsigned RATIO = 4,
  parameter int unsigned LANES = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        word_en,
  input  logic [RATIO-1:0][LANES-1:0] din,
  output logic [LANES-1:0]            dout
);

  logic [RATIO-1:0][LANES-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0;
    end else if (word_en) begin
      sh <= din;
    end else begin
      for (int k = 0; k < int'(RATIO) - 1; k++) sh[k] <= sh[k+1];
      sh[RATIO-1] <= '0;
    end
  end

  assign dout = sh[0];

endmodule
