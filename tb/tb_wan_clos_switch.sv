// tb_wan_clos_switch: self-checking test of the three-FPLD Clos switch,
// reduced to 4 crossbars of 4 x 4 per FPLD (16 channels). Each crossbar of
// each stage gets a random permutation (its four bit-slice copies alike); the
// path of every channel is traced here through the three stages and the
// shuffle links, and every output bit must equal the bit that entered its
// source channel exactly 96 line cycles before (three FPLDs of 32 cycles).
module tb_wan_clos_switch;
  localparam int unsigned XB = 4, P = 4, R = 4, ST = 3, N = XB * P;
  localparam int unsigned LAT = 3 * (2 * ST + 2) * R;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, cfg_cas;
  logic [1:0] cfg_chip;
  logic [4:0] cfg_arr;
  logic [2:0] cfg_col;
  logic [P-1:0] cfg_data;
  logic [N-1:0] ser_in, ser_out;

  wan_clos_switch #(.XBARS(XB), .PORTS(P), .RATIO(R), .STAGES(ST)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_chip(cfg_chip), .cfg_cas(cfg_cas), .cfg_arr(cfg_arr),
    .cfg_col(cfg_col), .cfg_data(cfg_data), .ser_in(ser_in), .ser_out(ser_out));

  int sel [3][XB][P];
  int src_of [N];   // input channel that feeds output channel n

  task automatic load_all();
    for (int k = 0; k < 3; k++)
      for (int b = 0; b < int'(XB); b++)
        for (int s = 0; s < int'(R); s++) begin
          for (int c = 0; c < int'(2 * P); c++) begin
            @(negedge clk);
            cfg_chip = 2'(k); cfg_cas = 1; cfg_arr = 5'(2 * (b * R + s)); cfg_col = 3'(c);
            for (int i = 0; i < int'(P); i++) cfg_data[i] = (c == 2 * i + 1);
          end
          for (int c = 0; c < int'(P); c++) begin
            @(negedge clk);
            cfg_chip = 2'(k); cfg_cas = 1; cfg_arr = 5'(2 * (b * R + s) + 1); cfg_col = 3'(c);
            for (int o = 0; o < int'(P); o++) cfg_data[o] = (sel[k][b][o] == c);
          end
        end
    @(negedge clk); cfg_cas = 0; cfg_chip = 2'd3;
  endtask

  // trace output channel n back to its input channel
  task automatic trace();
    for (int n = 0; n < int'(N); n++) begin
      int ch;
      ch = n;
      for (int k = 2; k >= 0; k--) begin
        int b, o;
        b = ch / P; o = ch % P;
        ch = b * P + sel[k][b][o];            // input channel of stage k
        if (k > 0) ch = (ch % P) * P + ch / P; // back through the shuffle
      end
      src_of[n] = ch;
    end
  endtask

  initial begin
    #50000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] hist [$];
    rst_n = 0; cfg_chip = 2'd3; cfg_cas = 0; cfg_arr = 0; cfg_col = 0; cfg_data = 0; ser_in = 0;
    for (int t = 0; t < 3; t++) begin
      for (int k = 0; k < 3; k++)
        for (int b = 0; b < int'(XB); b++) begin
          for (int o = 0; o < int'(P); o++) sel[k][b][o] = o;
          for (int o = P - 1; o > 0; o--) begin int r, tmp; r = $urandom % (o + 1); tmp = sel[k][b][o]; sel[k][b][o] = sel[k][b][r]; sel[k][b][r] = tmp; end
        end
      load_all();
      trace();
      hist.delete();
      rst_n = 0; ser_in = '0;
      @(negedge clk); rst_n = 1;
      for (int c = 0; c < 300; c++) begin
        ser_in = N'($urandom);
        hist.push_back(ser_in);
        if (c >= int'(LAT))
          for (int n = 0; n < int'(N); n++) begin
            checks++;
            if (ser_out[n] !== hist[c - LAT][src_of[n]]) begin
              failures++;
              if (failures < 10) $display("FAIL cycle %0d out %0d (from %0d)", c, n, src_of[n]);
            end
          end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
