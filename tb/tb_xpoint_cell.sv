// tb_xpoint_cell: self-checking test of one cross-point cell.
// Writes 0 and 1 into the personality bit, checks that the bit holds while
// wr_en is low, and that the pull-down conducts only for P = 1 and X = 1.
module tb_xpoint_cell;
  logic clk = 1'b0;
  logic wr_en, bit_in, x, p, pull_dn;
  int checks = 0, failures = 0;

  xpoint_cell dut (.clk(clk), .wr_en(wr_en), .bit_in(bit_in), .x(x), .p(p), .pull_dn(pull_dn));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; bit_in = 1'b0; x = 1'b0;
    for (int rep = 0; rep < 8; rep++) begin
      logic b;
      b = rep[0] ^ rep[2];
      // write
      @(negedge clk); wr_en = 1'b1; bit_in = b;
      @(negedge clk); wr_en = 1'b0; bit_in = ~b;
      check(p, b, "stored bit after write");
      // hold for a few cycles with the opposite value on the bit line
      repeat (3) @(negedge clk);
      check(p, b, "stored bit holds while wr_en low");
      // pull-down truth table
      x = 1'b0; #1 check(pull_dn, 1'b0, "pull-down off for x=0");
      x = 1'b1; #1 check(pull_dn, b,    "pull-down = P for x=1");
      x = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
