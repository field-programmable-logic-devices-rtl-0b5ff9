// tb_wan_fpld: self-checking test of one switch FPLD, reduced to 4 crossbars
// of 4 x 4 (16 streams) with the published 4-bit words and 3-cycle NOR arrays.
// Every crossbar (all four bit-slice copies alike) is loaded with a random
// permutation, or a multicast pattern; random bits stream into every input
// and each output must repeat the bits of the input its crossbar selects,
// exactly 32 line cycles later ((2*3 + 2) word times of 4 cycles).
module tb_wan_fpld;
  localparam int unsigned XB = 4, P = 4, R = 4, ST = 3, N = XB * P;
  localparam int unsigned LAT = (2 * ST + 2) * R;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, cfg_cs, cfg_cas;
  logic [4:0] cfg_arr;
  logic [2:0] cfg_col;
  logic [P-1:0] cfg_data;
  logic [N-1:0] ser_in, ser_out;

  wan_fpld #(.XBARS(XB), .PORTS(P), .RATIO(R), .STAGES(ST)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_cs(cfg_cs), .cfg_cas(cfg_cas), .cfg_arr(cfg_arr),
    .cfg_col(cfg_col), .cfg_data(cfg_data), .ser_in(ser_in), .ser_out(ser_out));

  int sel [XB][P];

  // crossbar b, every slice: term i = input i; output o = term sel[b][o]
  task automatic load_all();
    for (int b = 0; b < int'(XB); b++)
      for (int s = 0; s < int'(R); s++) begin
        for (int c = 0; c < int'(2 * P); c++) begin
          @(negedge clk);
          cfg_cs = 1; cfg_cas = 1; cfg_arr = 5'(2 * (b * R + s)); cfg_col = 3'(c);
          for (int i = 0; i < int'(P); i++) cfg_data[i] = (c == 2 * i + 1);
        end
        for (int c = 0; c < int'(P); c++) begin
          @(negedge clk);
          cfg_cs = 1; cfg_cas = 1; cfg_arr = 5'(2 * (b * R + s) + 1); cfg_col = 3'(c);
          for (int o = 0; o < int'(P); o++) cfg_data[o] = (sel[b][o] == c);
        end
      end
    @(negedge clk); cfg_cas = 0; cfg_cs = 0;
  endtask

  task automatic run(int cycles);
    logic [N-1:0] hist [$];
    hist.delete();
    rst_n = 0; ser_in = '0;
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < cycles; c++) begin
      ser_in = N'({$urandom, $urandom});
      hist.push_back(ser_in);
      if (c >= int'(LAT)) begin
        logic [N-1:0] src;
        src = hist[c - LAT];
        for (int b = 0; b < int'(XB); b++)
          for (int o = 0; o < int'(P); o++) begin
            checks++;
            if (ser_out[b * P + o] !== src[b * P + sel[b][o]]) begin
              failures++;
              if (failures < 10) $display("FAIL cycle %0d stream %0d", c, b * P + o);
            end
          end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cfg_cs = 0; cfg_cas = 0; cfg_arr = 0; cfg_col = 0; cfg_data = 0; ser_in = 0;
    for (int t = 0; t < 4; t++) begin
      for (int b = 0; b < int'(XB); b++) begin
        for (int o = 0; o < int'(P); o++) sel[b][o] = o;
        for (int o = P - 1; o > 0; o--) begin int r, tmp; r = $urandom % (o + 1); tmp = sel[b][o]; sel[b][o] = sel[b][r]; sel[b][r] = tmp; end
        if (t == 3) for (int o = 0; o < int'(P); o++) sel[b][o] = (o < 2) ? b % P : sel[b][o];  // multicast
      end
      load_all();
      run(200);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
