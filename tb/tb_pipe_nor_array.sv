// tb_pipe_nor_array: self-checking test of the pipelined NOR array at its
// default size (32 dual-rail inputs, 64 columns, 32 rows, 3 stages) and of a
// 32-input single-rail inverting copy. Random personality matrices are loaded
// column by column; random inputs are applied on enabled cycles (en is high
// on a random two thirds of the cycles) and each output is compared with the
// NOR computed here from the matrix, exactly three enabled edges later.
module tb_pipe_nor_array;
  localparam int unsigned NI = 32, NO = 32, ST = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, en, sel_a, sel_b, cas;
  logic [5:0] col;
  logic [NO-1:0] data, ya, yb;
  logic [NI-1:0] x;

  pipe_nor_array dut_a (.clk(clk), .rst_n(rst_n), .en(en), .sel(sel_a), .cas(cas), .col_addr(col),
                        .prog_data(data), .x(x), .y(ya));
  pipe_nor_array #(.N_IN(NI), .N_OUT(NO), .DUAL_RAIL(1'b0), .INVERT_OUT(1'b1), .STAGES(ST)) dut_b (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(sel_b), .cas(cas), .col_addr(col[4:0]),
    .prog_data(data), .x(x), .y(yb));

  logic [63:0] pa [NO];
  logic [31:0] pb [NO];

  function automatic logic [NO-1:0] ref_a(logic [NI-1:0] xv);
    logic [63:0] v;
    for (int j = 0; j < int'(NI); j++) begin v[2*j] = xv[j]; v[2*j+1] = !xv[j]; end
    for (int i = 0; i < int'(NO); i++) ref_a[i] = ((pa[i] & v) == 0);
  endfunction
  function automatic logic [NO-1:0] ref_b(logic [NI-1:0] xv);
    for (int i = 0; i < int'(NO); i++) ref_b[i] = ((pb[i] & xv) != 0);
  endfunction

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NI-1:0] hist [$];
    rst_n = 1'b0; en = 0; sel_a = 0; sel_b = 0; cas = 0; col = 0; data = 0; x = 0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < int'(NO); i++) begin
        pa[i] = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        pb[i] = $urandom & $urandom & $urandom;
      end
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        sel_a = 1'b1; sel_b = 1'b0; cas = 1'b1; col = 6'(c);
        for (int i = 0; i < int'(NO); i++) data[i] = pa[i][c];
      end
      for (int c = 0; c < 32; c++) begin
        @(negedge clk);
        sel_a = 1'b0; sel_b = 1'b1; cas = 1'b1; col = 6'(c);
        for (int i = 0; i < int'(NO); i++) data[i] = pb[i][c];
      end
      @(negedge clk); sel_a = 0; sel_b = 0; cas = 0;
      // flush with enabled cycles so the pipeline holds known inputs
      hist.delete();
      for (int c = 0; c < 300; c++) begin
        @(negedge clk);
        if (hist.size() >= int'(ST)) begin
          logic [NI-1:0] xo;
          // the input applied before the ST-th most recent enabled edge
          xo = hist[hist.size() - ST];
          checks++;
          if (ya !== ref_a(xo)) begin failures++; $display("FAIL A y=%h exp=%h", ya, ref_a(xo)); end
          checks++;
          if (yb !== ref_b(xo)) begin failures++; $display("FAIL B y=%h exp=%h", yb, ref_b(xo)); end
        end
        en = ($urandom % 3 != 0) || (c < 10);
        if (en) begin
          x = $urandom;
          hist.push_back(x);
          if (hist.size() > int'(ST) + 1) void'(hist.pop_front());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
