// tb_word_phase: checks that word_en marks every RATIO-th cycle, starting with
// cycle RATIO-1 after reset, and that phase counts 0..RATIO-1.
module tb_word_phase;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, word_en;
  logic [1:0] phase;

  word_phase dut (.clk(clk), .rst_n(rst_n), .phase(phase), .word_en(word_en));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int c = 0; c < 64; c++) begin
      // cycle c after reset release (sampled before the next edge)
      checks++;
      if (phase !== 2'(c % 4)) begin failures++; $display("FAIL phase %0d at cycle %0d", phase, c); end
      checks++;
      if (word_en !== (c % 4 == 3)) begin failures++; $display("FAIL word_en %b at cycle %0d", word_en, c); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
