// tb_nor_array: self-checking test of the programmable NOR array.
// Two instances: the default (5 dual-rail inputs, 10 rows, true outputs, the
// first array of a PLA) and 10 single-rail inputs, 6 rows, inverting outputs
// (the second array). Each is loaded one column at a time through SEL / CAS /
// column address / programming bus with a random personality matrix, and the
// outputs are compared for every input vector with a reference computed here
// from the matrix. Strobes with SEL low, and CAS low with SEL high, must not
// change anything.
module tb_nor_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // instance A: AND-plane shape
  localparam int unsigned A_IN = 5, A_OUT = 10, A_COLS = 10;
  logic a_sel, a_cas;
  logic [3:0] a_col;
  logic [A_OUT-1:0] a_data, a_y;
  logic [A_IN-1:0] a_x;
  nor_array dut_a (.clk(clk), .sel(a_sel), .cas(a_cas), .col_addr(a_col), .prog_data(a_data), .x(a_x), .y(a_y));

  // instance B: OR-plane shape
  localparam int unsigned B_IN = 10, B_OUT = 6, B_COLS = 10;
  logic b_sel, b_cas;
  logic [3:0] b_col;
  logic [B_OUT-1:0] b_data, b_y;
  logic [B_IN-1:0] b_x;
  nor_array #(.N_IN(B_IN), .N_OUT(B_OUT), .DUAL_RAIL(1'b0), .INVERT_OUT(1'b1)) dut_b (
    .clk(clk), .sel(b_sel), .cas(b_cas), .col_addr(b_col), .prog_data(b_data), .x(b_x), .y(b_y));

  logic [A_OUT-1:0][A_COLS-1:0] pa;   // pa[row][col]
  logic [B_OUT-1:0][B_COLS-1:0] pb;

  function automatic logic [A_OUT-1:0] ref_a(input logic [A_IN-1:0] x);
    logic [A_COLS-1:0] v;
    for (int j = 0; j < int'(A_IN); j++) begin v[2*j] = x[j]; v[2*j+1] = !x[j]; end
    for (int i = 0; i < int'(A_OUT); i++) ref_a[i] = ((pa[i] & v) == '0);
  endfunction

  function automatic logic [B_OUT-1:0] ref_b(input logic [B_IN-1:0] x);
    for (int i = 0; i < int'(B_OUT); i++) ref_b[i] = ((pb[i] & x) != '0);
  endfunction

  task automatic load_a();
    for (int c = 0; c < int'(A_COLS); c++) begin
      @(negedge clk);
      a_sel = 1'b1; a_cas = 1'b1; a_col = 4'(c);
      for (int i = 0; i < int'(A_OUT); i++) a_data[i] = pa[i][c];
    end
    @(negedge clk); a_sel = 1'b0; a_cas = 1'b0;
  endtask

  task automatic load_b();
    for (int c = 0; c < int'(B_COLS); c++) begin
      @(negedge clk);
      b_sel = 1'b1; b_cas = 1'b1; b_col = 4'(c);
      for (int i = 0; i < int'(B_OUT); i++) b_data[i] = pb[i][c];
    end
    @(negedge clk); b_sel = 1'b0; b_cas = 1'b0;
  endtask

  task automatic sweep();
    for (int v = 0; v < 32; v++) begin
      a_x = 5'(v); #1;
      checks++;
      if (a_y !== ref_a(a_x)) begin failures++; $display("FAIL A x=%b y=%b exp=%b", a_x, a_y, ref_a(a_x)); end
    end
    for (int v = 0; v < 1024; v += 3) begin
      b_x = 10'(v); #1;
      checks++;
      if (b_y !== ref_b(b_x)) begin failures++; $display("FAIL B x=%b y=%b exp=%b", b_x, b_y, ref_b(b_x)); end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_sel = 0; a_cas = 0; a_col = 0; a_data = 0; a_x = 0;
    b_sel = 0; b_cas = 0; b_col = 0; b_data = 0; b_x = 0;
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < int'(A_OUT); i++) pa[i] = A_COLS'($urandom) & A_COLS'($urandom);
      for (int i = 0; i < int'(B_OUT); i++) pb[i] = B_COLS'($urandom) & B_COLS'($urandom);
      if (t == 0) begin pa = '0; pb = '0; end
      load_a(); load_b();
      sweep();
      // strobes that must not write: CAS without SEL, SEL without CAS
      @(negedge clk); a_sel = 1'b0; a_cas = 1'b1; a_col = 4'd3; a_data = ~a_data;
      b_sel = 1'b1; b_cas = 1'b0; b_col = 4'd2; b_data = ~b_data;
      @(negedge clk); a_cas = 1'b0; b_sel = 1'b0;
      sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
