// tb_nor_row: self-checking test of one programmable NOR row.
// Programs random personality patterns column by column and checks the row
// output against z = NOR of the enabled inputs for every input vector; also
// checks the all-disabled row (constant 1) and that writes to one column
// leave the others alone.
module tb_nor_row;
  localparam int unsigned COLS = 10;
  logic clk = 1'b0;
  logic [COLS-1:0] col_we, x, p;
  logic bit_in, z;
  int checks = 0, failures = 0;

  nor_row #(.COLS(COLS)) dut (.clk(clk), .col_we(col_we), .bit_in(bit_in), .x(x), .p(p), .z(z));

  always #5 clk = ~clk;

  task automatic program_row(input logic [COLS-1:0] pat);
    for (int j = 0; j < int'(COLS); j++) begin
      @(negedge clk);
      col_we = '0; col_we[j] = 1'b1; bit_in = pat[j];
    end
    @(negedge clk);
    col_we = '0; bit_in = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [COLS-1:0] pat;
    col_we = '0; bit_in = 1'b0; x = '0;
    for (int t = 0; t < 12; t++) begin
      case (t)
        0:       pat = '0;
        1:       pat = '1;
        2:       pat = COLS'(1);
        default: pat = COLS'($urandom);
      endcase
      program_row(pat);
      checks++;
      if (p !== pat) begin failures++; $display("FAIL personality %b expected %b", p, pat); end
      for (int v = 0; v < (1 << COLS); v += (t < 3 ? 1 : 7)) begin
        x = COLS'(v);
        #1;
        checks++;
        if (z !== ~|(pat & x)) begin
          failures++;
          $display("FAIL pat=%b x=%b z=%b", pat, x, z);
        end
      end
    end
    // one-column rewrite leaves the rest
    program_row('0);
    @(negedge clk); col_we = COLS'(1) << 4; bit_in = 1'b1;
    @(negedge clk); col_we = '0;
    checks++;
    if (p !== (COLS'(1) << 4)) begin failures++; $display("FAIL single-column write p=%b", p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
