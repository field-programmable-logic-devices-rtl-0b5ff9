// tb_xbar_pla: self-checking test of the pipelined 32 x 32 crossbar PLA.
// Loads random permutations (product term i = input i, output o = term
// sel[o]), then multicast and broadcast settings, and a random sum of
// products; streams random input vectors with en high once every four cycles
// (the word rate) and checks each output vector six enabled edges later
// against the value computed here. A single pulse measures the latency.
module tb_xbar_pla;
  localparam int unsigned P = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, en, sel_and, sel_or, cas;
  logic [5:0] col;
  logic [P-1:0] data, x, y;

  xbar_pla dut (.clk(clk), .rst_n(rst_n), .en(en), .sel_and(sel_and), .sel_or(sel_or), .cas(cas),
                .col_addr(col), .prog_data(data), .x(x), .y(y));

  // AND plane: and_en[i] = columns enabled in row i; OR plane: or_en[o] = terms of output o
  logic [2*P-1:0] and_en [P];
  logic [P-1:0]   or_en [P];

  function automatic logic [P-1:0] ref_y(logic [P-1:0] xv);
    logic [2*P-1:0] v;
    logic [P-1:0] z;
    for (int j = 0; j < int'(P); j++) begin v[2*j] = xv[j]; v[2*j+1] = !xv[j]; end
    for (int i = 0; i < int'(P); i++) z[i] = ((and_en[i] & v) == 0);
    for (int o = 0; o < int'(P); o++) ref_y[o] = ((or_en[o] & z) != 0);
  endfunction

  task automatic load();
    for (int c = 0; c < int'(2 * P); c++) begin
      @(negedge clk);
      sel_and = 1; sel_or = 0; cas = 1; col = 6'(c);
      for (int i = 0; i < int'(P); i++) data[i] = and_en[i][c];
    end
    for (int c = 0; c < int'(P); c++) begin
      @(negedge clk);
      sel_and = 0; sel_or = 1; cas = 1; col = 6'(c);
      for (int o = 0; o < int'(P); o++) data[o] = or_en[o][c];
    end
    @(negedge clk); sel_and = 0; sel_or = 0; cas = 0;
  endtask

  task automatic crossbar(int sel [P]);
    for (int i = 0; i < int'(P); i++) begin and_en[i] = '0; and_en[i][2*i+1] = 1'b1; end
    for (int o = 0; o < int'(P); o++) or_en[o] = P'(1) << sel[o];
  endtask

  task automatic stream(int n);
    logic [P-1:0] hist [$];
    hist.delete();
    for (int c = 0; c < 4 * n; c++) begin
      @(negedge clk);
      en = (c % 4 == 3);
      if (c % 4 == 0 && hist.size() >= 6) begin
        checks++;
        if (y !== ref_y(hist[hist.size() - 6])) begin
          failures++; $display("FAIL y=%h exp=%h", y, ref_y(hist[hist.size() - 6]));
        end
      end
      if (en) begin x = $urandom; hist.push_back(x); end
    end
    en = 0;
  endtask

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel [P];
    int lat;
    rst_n = 0; en = 0; sel_and = 0; sel_or = 0; cas = 0; col = 0; data = 0; x = 0;
    #12 rst_n = 1;
    // permutations
    for (int t = 0; t < 3; t++) begin
      for (int o = 0; o < int'(P); o++) sel[o] = o;
      for (int o = P - 1; o > 0; o--) begin int r, tmp; r = $urandom % (o + 1); tmp = sel[o]; sel[o] = sel[r]; sel[r] = tmp; end
      crossbar(sel); load(); stream(60);
    end
    // multicast: outputs 0..7 all listen to input 5, the rest random
    for (int o = 0; o < int'(P); o++) sel[o] = (o < 8) ? 5 : $urandom % P;
    crossbar(sel); load(); stream(60);
    // broadcast: every output listens to input 31
    for (int o = 0; o < int'(P); o++) sel[o] = 31;
    crossbar(sel); load(); stream(60);
    // general sum of products
    for (int i = 0; i < int'(P); i++) and_en[i] = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
    for (int o = 0; o < int'(P); o++) or_en[o] = $urandom & $urandom;
    load(); stream(60);
    // latency in enabled edges: identity, pulse on input 0
    for (int o = 0; o < int'(P); o++) sel[o] = o;
    crossbar(sel); load();
    x = '0; en = 1; repeat (8) @(negedge clk);
    x = 32'h1; lat = 0;
    do begin @(negedge clk); lat++; end while (y[0] !== 1'b1 && lat < 20);
    checks++;
    if (lat != 6) begin failures++; $display("FAIL latency %0d enabled edges, expected 6", lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
