// tb_serializer: loads a random word at every word boundary and checks that
// the serial output sends its bits 0..3 in the four cycles that follow; a
// second, 5-lane instance loads four random bit planes and sends them in turn.
module tb_serializer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, word_en, dout;
  logic [1:0] phase;
  logic [3:0] din, sent;
  logic [4:0] dout5;
  logic [3:0][4:0] din5, sent5;

  word_phase u_ph (.clk(clk), .rst_n(rst_n), .phase(phase), .word_en(word_en));
  serializer dut (.clk(clk), .rst_n(rst_n), .word_en(word_en), .din(din), .dout(dout));
  serializer #(.LANES(5)) dut5 (.clk(clk), .rst_n(rst_n), .word_en(word_en), .din(din5), .dout(dout5));

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; din = '0; sent = '0; din5 = '0; sent5 = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      if (c % 4 == 3) begin   // presented in the word_en cycle
        din = 4'($urandom);
        din5 = 20'($urandom);
      end
      if (c >= 4) begin
        checks++;
        if (dout !== sent[c % 4]) begin failures++; $display("FAIL cycle %0d dout=%b exp=%b", c, dout, sent[c % 4]); end
        checks++;
        if (dout5 !== sent5[c % 4]) begin failures++; $display("FAIL cycle %0d dout5=%b exp=%b", c, dout5, sent5[c % 4]); end
      end
      @(negedge clk);
      if (c % 4 == 3) begin sent = din; sent5 = din5; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
