// tb_pla: self-checking test of the NOR-NOR PLA (5 inputs, 10 terms, 6 outputs).
// Each test picks, for every product term, a literal per input (absent, true or
// complemented) and, for every output, a set of terms; it translates that into
// the two personality matrices, loads them one column at a time, and checks
// every input vector: the product terms one cycle later (z_q) and the outputs
// in the same cycle as z_q, against sums of products evaluated here. The first
// test is the example sum of products of the classic AND-OR drawing
// (z0 = x0, z1 = x1 ~x3, z3 = ~x0 ~x1 x3 x4, y2 = z1 + z3).
module tb_pla;
  import fpld_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, sel_and, sel_or, cas;
  logic [3:0] col_addr;
  logic [PLA_TERMS-1:0] prog_data, z_q;
  logic [PLA_IN-1:0] x;
  logic [PLA_OUT-1:0] y;

  pla dut (.clk(clk), .rst_n(rst_n), .sel_and(sel_and), .sel_or(sel_or), .cas(cas),
           .col_addr(col_addr), .prog_data(prog_data), .x(x), .z_q(z_q), .y(y));

  // literal codes: 0 absent, 1 true, 2 complemented, 3 both (term forced to 0)
  logic [1:0] lit [PLA_TERMS][PLA_IN];
  logic [PLA_TERMS-1:0] use_term [PLA_OUT];

  function automatic logic [PLA_TERMS-1:0] ref_z(input logic [PLA_IN-1:0] xv);
    for (int i = 0; i < int'(PLA_TERMS); i++) begin
      ref_z[i] = 1'b1;
      for (int j = 0; j < int'(PLA_IN); j++) begin
        case (lit[i][j])
          2'd1: ref_z[i] &= xv[j];
          2'd2: ref_z[i] &= !xv[j];
          2'd3: ref_z[i] = 1'b0;
          default: ;
        endcase
      end
    end
  endfunction

  function automatic logic [PLA_OUT-1:0] ref_y(input logic [PLA_TERMS-1:0] zv);
    for (int k = 0; k < int'(PLA_OUT); k++) ref_y[k] = |(use_term[k] & zv);
  endfunction

  task automatic load();
    // AND array: column 2j carries x_j, 2j+1 carries ~x_j; a NOR row gives the
    // AND of the complements of what it enables.
    for (int c = 0; c < 10; c++) begin
      @(negedge clk);
      sel_and = 1'b1; sel_or = 1'b0; cas = 1'b1; col_addr = 4'(c);
      for (int i = 0; i < int'(PLA_TERMS); i++) begin
        logic [1:0] l;
        l = lit[i][c/2];
        prog_data[i] = (c % 2 == 0) ? (l == 2'd2 || l == 2'd3) : (l == 2'd1 || l == 2'd3);
      end
    end
    // OR array: column j is product term j, row k is output k.
    for (int c = 0; c < int'(PLA_TERMS); c++) begin
      @(negedge clk);
      sel_and = 1'b0; sel_or = 1'b1; cas = 1'b1; col_addr = 4'(c);
      prog_data = '0;
      for (int k = 0; k < int'(PLA_OUT); k++) prog_data[k] = use_term[k][c];
    end
    @(negedge clk); sel_and = 1'b0; sel_or = 1'b0; cas = 1'b0;
  endtask

  task automatic sweep();
    for (int v = 0; v < 32; v++) begin
      logic [PLA_TERMS-1:0] zexp;
      @(negedge clk); x = 5'(v);
      zexp = ref_z(5'(v));
      @(negedge clk);   // one rising edge later the product terms are registered
      checks++;
      if (z_q !== zexp) begin failures++; $display("FAIL z x=%b z=%b exp=%b", x, z_q, zexp); end
      checks++;
      if (y !== ref_y(zexp)) begin failures++; $display("FAIL y x=%b y=%b exp=%b", x, y, ref_y(zexp)); end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; sel_and = 0; sel_or = 0; cas = 0; col_addr = 0; prog_data = 0; x = 0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < int'(PLA_TERMS); i++)
        for (int j = 0; j < int'(PLA_IN); j++)
          lit[i][j] = ($urandom % 8 == 0) ? 2'd3 : 2'($urandom % 3);
      for (int k = 0; k < int'(PLA_OUT); k++) use_term[k] = PLA_TERMS'($urandom) & PLA_TERMS'($urandom);
      if (t == 0) begin
        for (int i = 0; i < int'(PLA_TERMS); i++)
          for (int j = 0; j < int'(PLA_IN); j++) lit[i][j] = 2'd3;   // unused terms off
        foreach (lit[0][j]) lit[0][j] = 2'd0;
        lit[0][0] = 2'd1;                                            // z0 = x0
        foreach (lit[1][j]) lit[1][j] = 2'd0;
        lit[1][1] = 2'd1; lit[1][3] = 2'd2;                          // z1 = x1 ~x3
        foreach (lit[3][j]) lit[3][j] = 2'd0;
        lit[3][0] = 2'd2; lit[3][1] = 2'd2; lit[3][3] = 2'd1; lit[3][4] = 2'd1; // z3
        for (int k = 0; k < int'(PLA_OUT); k++) use_term[k] = '0;
        use_term[2] = 10'b00_0000_1010;                              // y2 = z1 + z3
      end
      load();
      sweep();
    end
    // reset clears the product-term buffers
    rst_n = 1'b0; #1;
    checks++;
    if (z_q !== '0) begin failures++; $display("FAIL reset z_q=%b", z_q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
