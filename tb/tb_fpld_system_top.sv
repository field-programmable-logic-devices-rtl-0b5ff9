// tb_fpld_system_top: end-to-end test of both pieces of hardware at their
// full published sizes (no parameter overrides).
//
// Logic die: all 960 personality bits loaded as six 4 x 4 crossbars forming two
// Clos stages (random permutations, multicast, broadcast), checked six cycles
// after the inputs; then six independent random sums of products (three-cycle
// latency); then a one-bit feedback state machine.
// Backbone switch: 3 FPLDs x 32 crossbars x 4 bit-slice copies loaded with
// random permutations (one crossbar per stage with multicast), 36,864 column
// writes; random bits stream into all 1024 channels and every output must
// repeat the bit of the channel the settings route to it, exactly 96 line
// cycles later.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fpld_system_top;
  import fpld_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, cfg_cas, link_en;
  logic [ARR_W-1:0] cfg_arr;
  logic [COL_W-1:0] cfg_col;
  logic [PBUS_W-1:0] cfg_data;
  logic [NUM_CELLS-1:0] fb_en;
  logic [NUM_CELLS-1:0][PLA_IN-1:0]  cell_in;
  logic [NUM_CELLS-1:0][PLA_OUT-1:0] cell_out;

  // backbone switch side, default sizes
  localparam int unsigned XB = 32, P = 32, R = 4, ST = 3, N = XB * P;
  localparam int unsigned LAT = 3 * (2 * ST + 2) * R;
  logic [1:0] sw_cfg_chip;
  logic sw_cfg_cas;
  logic [7:0] sw_cfg_arr;
  logic [5:0] sw_cfg_col;
  logic [P-1:0] sw_cfg_data;
  logic [N-1:0] sw_in, sw_out;

  fpld_system_top dut (
    .clk(clk), .rst_n(rst_n),
    .die_cfg_cas(cfg_cas), .die_cfg_arr(cfg_arr), .die_cfg_col(cfg_col), .die_cfg_data(cfg_data),
    .die_fb_en(fb_en), .die_link_en(link_en), .die_in(cell_in), .die_out(cell_out),
    .sw_cfg_chip(sw_cfg_chip), .sw_cfg_cas(sw_cfg_cas), .sw_cfg_arr(sw_cfg_arr),
    .sw_cfg_col(sw_cfg_col), .sw_cfg_data(sw_cfg_data), .sw_in(sw_in), .sw_out(sw_out));

  int n_sw_writes = 0, n_sw_bits = 0, n_sw_multicast = 0;
  int ssel [3][XB][P];
  int src_of [N];

  // switch: crossbar b of FPLD k, every bit-slice copy: term i = input i,
  // output o = term ssel[k][b][o]
  task automatic sw_load();
    for (int k = 0; k < 3; k++)
      for (int b = 0; b < int'(XB); b++)
        for (int s = 0; s < int'(R); s++) begin
          for (int c = 0; c < int'(2 * P); c++) begin
            @(negedge clk);
            sw_cfg_chip = 2'(k); sw_cfg_cas = 1; sw_cfg_arr = 8'(2 * (b * R + s)); sw_cfg_col = 6'(c);
            for (int i = 0; i < int'(P); i++) sw_cfg_data[i] = (c == 2 * i + 1);
            n_sw_writes++;
          end
          for (int c = 0; c < int'(P); c++) begin
            @(negedge clk);
            sw_cfg_chip = 2'(k); sw_cfg_cas = 1; sw_cfg_arr = 8'(2 * (b * R + s) + 1); sw_cfg_col = 6'(c);
            for (int o = 0; o < int'(P); o++) sw_cfg_data[o] = (ssel[k][b][o] == c);
            n_sw_writes++;
          end
        end
    @(negedge clk); sw_cfg_cas = 0; sw_cfg_chip = 2'd3;
  endtask

  // output channel n <- input channel src_of[n], through three stages and
  // the shuffle (crossbar a, port j) -> (crossbar j, port a) between them
  task automatic sw_trace();
    for (int n = 0; n < int'(N); n++) begin
      int ch;
      ch = n;
      for (int k = 2; k >= 0; k--) begin
        int b, o;
        b = ch / P; o = ch % P;
        ch = b * P + ssel[k][b][o];
        if (k > 0) ch = (ch % P) * P + ch / P;
      end
      src_of[n] = ch;
    end
  endtask

  // stream random bits into all channels; every output must repeat its
  // source channel LAT line cycles later
  task automatic sw_run(int cycles);
    logic [N-1:0] hist [$];
    hist.delete();
    for (int c = 0; c < cycles; c++) begin
      for (int w = 0; w < int'(N / 32); w++) sw_in[w*32 +: 32] = $urandom;
      hist.push_back(sw_in);
      if (c >= int'(LAT)) begin
        for (int n = 0; n < int'(N); n++) begin
          checks++;
          if (sw_out[n] !== hist[c - LAT][src_of[n]]) begin
            failures++;
            if (failures < 10) $display("FAIL switch cycle %0d out %0d (from %0d)", c, n, src_of[n]);
          end
        end
        n_sw_bits += N;
      end
      @(negedge clk);
    end
  endtask

  // mechanism counters
  int n_col_writes = 0, n_clos_words = 0, n_multicast = 0, n_broadcast = 0;
  int n_logic_vectors = 0, n_fb_toggles = 0, n_reset = 0;

  // per-cell program: literal codes (0 absent, 1 true, 2 complemented, 3 off)
  logic [1:0] lit [NUM_CELLS][PLA_TERMS][PLA_IN];
  logic [PLA_TERMS-1:0] use_term [NUM_CELLS][PLA_OUT];

  // link table of the two-stage arrangement: stage-1 cell a, link j -> cell b
  int dst [3][4] = '{'{0, 0, 1, 2}, '{0, 1, 1, 2}, '{0, 1, 2, 2}};
  int rx_k [3][4];   // receive port on cell dst[a][j]

  // crossbar settings: sel[c][o] = input (0..3) that feeds crossbar output o
  int xsel [NUM_CELLS][4];

  function automatic logic [PLA_TERMS-1:0] ref_z(int c, logic [PLA_IN-1:0] xv);
    for (int i = 0; i < int'(PLA_TERMS); i++) begin
      ref_z[i] = 1'b1;
      for (int j = 0; j < int'(PLA_IN); j++)
        case (lit[c][i][j])
          2'd1: ref_z[i] &= xv[j];
          2'd2: ref_z[i] &= !xv[j];
          2'd3: ref_z[i] = 1'b0;
          default: ;
        endcase
    end
  endfunction

  function automatic logic [PLA_OUT-1:0] ref_y(int c, logic [PLA_TERMS-1:0] zv);
    for (int k = 0; k < int'(PLA_OUT); k++) ref_y[k] = |(use_term[c][k] & zv);
  endfunction

  // load every array of every cell from lit / use_term: 12 arrays x 10 columns
  task automatic load_die();
    for (int c = 0; c < int'(NUM_CELLS); c++) begin
      for (int col = 0; col < int'(AND_COLS); col++) begin
        @(negedge clk);
        cfg_cas = 1'b1; cfg_arr = ARR_W'(2 * c); cfg_col = COL_W'(col);
        for (int i = 0; i < int'(PLA_TERMS); i++) begin
          logic [1:0] l;
          l = lit[c][i][col/2];
          cfg_data[i] = (col % 2 == 0) ? (l == 2'd2 || l == 2'd3) : (l == 2'd1 || l == 2'd3);
        end
        n_col_writes++;
      end
      for (int col = 0; col < int'(PLA_TERMS); col++) begin
        @(negedge clk);
        cfg_cas = 1'b1; cfg_arr = ARR_W'(2 * c + 1); cfg_col = COL_W'(col);
        cfg_data = '0;
        for (int k = 0; k < int'(PLA_OUT); k++) cfg_data[k] = use_term[c][k][col];
        n_col_writes++;
      end
    end
    @(negedge clk); cfg_cas = 1'b0; cfg_data = '0;
  endtask

  // crossbar program: term i = input i (i < 4), other terms off;
  // output y[o+1] = term xsel[c][o]; y0, y5 unused
  task automatic crossbar_program(int c);
    for (int i = 0; i < int'(PLA_TERMS); i++)
      for (int j = 0; j < int'(PLA_IN); j++)
        lit[c][i][j] = (i < 4) ? ((i == j) ? 2'd1 : 2'd0) : 2'd3;
    for (int k = 0; k < int'(PLA_OUT); k++) use_term[c][k] = '0;
    for (int o = 0; o < 4; o++) use_term[c][o + 1] = PLA_TERMS'(1) << xsel[c][o];
  endtask

  task automatic random_perm(int c);
    int p [4];
    p = '{0, 1, 2, 3};
    for (int i = 3; i > 0; i--) begin
      int r, tmp;
      r = $urandom % (i + 1);
      tmp = p[i]; p[i] = p[r]; p[r] = tmp;
    end
    for (int o = 0; o < 4; o++) xsel[c][o] = p[o];
  endtask

  // expected Clos outputs for one 12-bit input word
  function automatic logic [NUM_CELLS-1:0][PLA_OUT-1:0] clos_ref(logic [2:0][3:0] in);
    logic [2:0][3:0] mid;      // mid[b][k]: input k of second-stage cell b
    logic [2:0][3:0] s1o;
    clos_ref = '0;
    for (int a = 0; a < 3; a++)
      for (int o = 0; o < 4; o++) s1o[a][o] = in[a][xsel[a][o]];
    for (int a = 0; a < 3; a++)
      for (int j = 0; j < 4; j++) mid[dst[a][j]][rx_k[a][j]] = s1o[a][j];
    for (int b = 0; b < 3; b++) begin
      for (int o = 0; o < 4; o++) clos_ref[3 + b][o + 1] = mid[b][xsel[3 + b][o]];
      for (int a = 0; a < 3; a++) clos_ref[a] = {1'b0, s1o[a], 1'b0};
    end
  endfunction

  // stream random words through the network, check six cycles later
  task automatic run_clos(int n);
    logic [2:0][3:0] hist [$];
    for (int t = 0; t < n + 6; t++) begin
      logic [2:0][3:0] w;
      w = 12'($urandom);
      @(negedge clk);
      for (int a = 0; a < 3; a++) cell_in[a] = {1'b0, w[a]};
      hist.push_back(w);
      if (hist.size() > 7) begin
        logic [NUM_CELLS-1:0][PLA_OUT-1:0] e;
        void'(hist.pop_front());
        // cell_out now reflects the word applied six edges ago (hist[0])
        e = clos_ref(hist[0]);
        for (int b = 3; b < 6; b++) begin
          checks++;
          if (cell_out[b] !== e[b]) begin
            failures++;
            $display("FAIL clos cell %0d out=%b exp=%b", b, cell_out[b], e[b]);
          end
        end
        n_clos_words++;
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (cell_out !== '0) begin failures++; $display("FAIL outputs not cleared by reset"); end
    rst_n = 1'b1;
    n_reset++;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    rst_n = 1'b0; cfg_cas = 0; cfg_arr = 0; cfg_col = 0; cfg_data = 0;
    fb_en = '0; link_en = 1'b1; cell_in = '0;
    sw_cfg_chip = 2'd3; sw_cfg_cas = 0; sw_cfg_arr = 0; sw_cfg_col = 0; sw_cfg_data = 0; sw_in = '0;

    for (int b = 0; b < 3; b++) begin
      int k;
      k = 0;
      for (int a = 0; a < 3; a++)
        for (int j = 0; j < 4; j++)
          if (dst[a][j] == b) begin rx_k[a][j] = k; k++; end
    end

    // ---------------- phase 1: Clos permutations -----------------------------
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < int'(NUM_CELLS); c++) begin random_perm(c); crossbar_program(c); end
      load_die();
      do_reset();
      run_clos(40);
    end

    // latency of the network: one pulse on input 0, count to its output
    begin
      logic [NUM_CELLS-1:0][PLA_OUT-1:0] e;
      logic [2:0][3:0] w;
      cell_in = '0;
      repeat (8) @(negedge clk);
      w = '0; w[0][0] = 1'b1;
      e = clos_ref(w);
      cell_in[0][0] = 1'b1;
      lat = 0;
      do begin @(negedge clk); lat++; end while (cell_out[5:3] !== e[5:3] && lat < 20);
      checks++;
      if (lat != 6) begin failures++; $display("FAIL network latency %0d, expected 6", lat); end
      cell_in = '0;
    end

    // multicast: crossbar 3 sends its input 1 to outputs 0 and 2
    for (int c = 0; c < int'(NUM_CELLS); c++) begin random_perm(c); end
    xsel[3][0] = 1; xsel[3][2] = 1;
    for (int c = 0; c < int'(NUM_CELLS); c++) crossbar_program(c);
    load_die(); do_reset(); run_clos(40);
    n_multicast++;

    // broadcast: crossbar 1 sends input 3 to all four outputs
    for (int c = 0; c < int'(NUM_CELLS); c++) begin random_perm(c); end
    xsel[1] = '{3, 3, 3, 3};
    for (int c = 0; c < int'(NUM_CELLS); c++) crossbar_program(c);
    load_die(); do_reset(); run_clos(40);
    n_broadcast++;

    // ---------------- phase 2: independent logic -----------------------------
    link_en = 1'b0;
    for (int s = 0; s < 3; s++) begin
      logic [NUM_CELLS-1:0][PLA_IN-1:0] hist [$];
      for (int c = 0; c < int'(NUM_CELLS); c++) begin
        for (int i = 0; i < int'(PLA_TERMS); i++)
          for (int j = 0; j < int'(PLA_IN); j++)
            lit[c][i][j] = ($urandom % 8 == 0) ? 2'd3 : 2'($urandom % 3);
        for (int k = 0; k < int'(PLA_OUT); k++) use_term[c][k] = PLA_TERMS'($urandom) & PLA_TERMS'($urandom);
      end
      load_die(); do_reset();
      hist.delete();
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        cell_in = 30'($urandom);
        hist.push_back(cell_in);
        if (hist.size() > 4) begin
          void'(hist.pop_front());
          for (int c = 0; c < int'(NUM_CELLS); c++) begin
            logic [PLA_OUT-1:0] e;
            e = ref_y(c, ref_z(c, hist[0][c]));
            checks++;
            if (cell_out[c] !== e) begin failures++; $display("FAIL logic cell %0d out=%b exp=%b", c, cell_out[c], e); end
          end
          n_logic_vectors++;
        end
      end
    end

    // ---------------- phase 3: feedback state -------------------------------
    // cell 2: z0 = ~x4, y5 = z0 (next state), y1 = x4 (state shown)
    for (int i = 0; i < int'(PLA_TERMS); i++) for (int j = 0; j < int'(PLA_IN); j++) lit[2][i][j] = 2'd3;
    for (int k = 0; k < int'(PLA_OUT); k++) use_term[2][k] = '0;
    for (int j = 0; j < int'(PLA_IN); j++) begin lit[2][0][j] = 2'd0; lit[2][1][j] = 2'd0; end
    lit[2][0][4] = 2'd2; lit[2][1][4] = 2'd1;
    use_term[2][5] = 10'b01; use_term[2][1] = 10'b10;
    load_die();
    fb_en = 6'b000100;
    cell_in = '0;
    do_reset();
    begin
      logic prev;
      int runs;
      prev = cell_out[2][5];
      runs = 0;
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        if (cell_out[2][5] != prev) begin n_fb_toggles++; runs = 0; end else runs++;
        // the state toggles in a two-cycle loop: never more than two equal samples
        checks++;
        if (t > 4 && runs > 2) begin failures++; $display("FAIL feedback state stuck at %b", cell_out[2][5]); end
        prev = cell_out[2][5];
      end
    end

    // ---------------- backbone switch ---------------------------------------
    for (int k = 0; k < 3; k++)
      for (int b = 0; b < int'(XB); b++) begin
        for (int o = 0; o < int'(P); o++) ssel[k][b][o] = o;
        for (int o = P - 1; o > 0; o--) begin int r, tmp; r = $urandom % (o + 1); tmp = ssel[k][b][o]; ssel[k][b][o] = ssel[k][b][r]; ssel[k][b][r] = tmp; end
      end
    // multicast in one crossbar of each stage: outputs 0..3 copy one input
    for (int k = 0; k < 3; k++) for (int o = 0; o < 4; o++) ssel[k][7][o] = 9;
    n_sw_multicast++;
    sw_load();
    sw_trace();
    rst_n = 1'b0; sw_in = '0;
    @(negedge clk); rst_n = 1'b1;   // also aligns the word boundary
    sw_run(LAT + 40);

    // ---------------- coverage ----------------------------------------------
    $display("mechanisms: column writes=%0d clos words=%0d multicast=%0d broadcast=%0d logic vectors=%0d feedback toggles=%0d resets=%0d",
             n_col_writes, n_clos_words, n_multicast, n_broadcast, n_logic_vectors, n_fb_toggles, n_reset);
    checks++; if (n_col_writes < 120)  begin failures++; $display("FAIL no full die load"); end
    checks++; if (n_clos_words == 0)   begin failures++; $display("FAIL Clos routing never ran"); end
    checks++; if (n_multicast == 0)    begin failures++; $display("FAIL multicast never ran"); end
    checks++; if (n_broadcast == 0)    begin failures++; $display("FAIL broadcast never ran"); end
    checks++; if (n_logic_vectors == 0) begin failures++; $display("FAIL logic mode never ran"); end
    checks++; if (n_fb_toggles == 0)   begin failures++; $display("FAIL feedback never toggled"); end
    checks++; if (n_reset == 0)        begin failures++; $display("FAIL reset never ran"); end
    $display("switch: column writes=%0d bits checked=%0d multicast settings=%0d", n_sw_writes, n_sw_bits, n_sw_multicast);
    checks++; if (n_sw_writes < 3 * XB * R * 3 * P) begin failures++; $display("FAIL switch not fully loaded"); end
    checks++; if (n_sw_bits == 0)      begin failures++; $display("FAIL switch traffic never checked"); end
    checks++; if (n_sw_multicast == 0) begin failures++; $display("FAIL switch multicast never set"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
