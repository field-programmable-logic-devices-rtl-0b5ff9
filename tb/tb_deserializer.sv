// tb_deserializer: sends a random bit stream; after each word boundary the
// parallel word must hold the last four bits, the first-received in bit 0,
// and stay there for the whole next word time. A second, 5-lane instance
// gets independent streams and is checked plane by plane.
module tb_deserializer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, word_en, din;
  logic [1:0] phase;
  logic [3:0] dout, exp_w, cur;
  logic [4:0] din5;
  logic [3:0][4:0] dout5, exp5, cur5;

  word_phase u_ph (.clk(clk), .rst_n(rst_n), .phase(phase), .word_en(word_en));
  deserializer dut (.clk(clk), .rst_n(rst_n), .word_en(word_en), .din(din), .dout(dout));
  deserializer #(.LANES(5)) dut5 (.clk(clk), .rst_n(rst_n), .word_en(word_en), .din(din5), .dout(dout5));

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; din = 1'b0; exp_w = '0; din5 = '0; exp5 = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      // cycle c: bit c % 4 of word c / 4
      din = 1'($urandom);
      cur[c % 4] = din;
      din5 = 5'($urandom);
      cur5[c % 4] = din5;
      checks++;
      if (dout5 !== exp5) begin failures++; $display("FAIL cycle %0d dout5=%h exp=%h", c, dout5, exp5); end
      checks++;
      if (dout !== exp_w) begin failures++; $display("FAIL cycle %0d dout=%b exp=%b", c, dout, exp_w); end
      @(negedge clk);
      if (c % 4 == 3) begin exp_w = cur; exp5 = cur5; end   // the word appears right after its last bit
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
