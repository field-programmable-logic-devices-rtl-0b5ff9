// tb_fsm_cell: self-checking test of one FSM cell.
// Loads random sums of products into the cell's PLA and drives random inputs
// with the feedback path off and on; every cycle y_out is compared with a
// cycle model kept here (input buffer, product-term buffer, output buffer,
// feedback flip-flop on y5 replacing x4). Also measures the input-to-output
// latency (three cycles) and runs a one-bit state machine: y5 = ~x4 with the
// feedback on must toggle, and y1 = x4 must show that state.
module tb_fsm_cell;
  import fpld_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, fb_en, sel_and, sel_or, cas;
  logic [3:0] col_addr;
  logic [PLA_TERMS-1:0] prog_data;
  logic [PLA_IN-1:0] x_in;
  logic [PLA_OUT-1:0] y_out;

  fsm_cell dut (.clk(clk), .rst_n(rst_n), .fb_en(fb_en), .sel_and(sel_and), .sel_or(sel_or),
                .cas(cas), .col_addr(col_addr), .prog_data(prog_data), .x_in(x_in), .y_out(y_out));

  logic [1:0] lit [PLA_TERMS][PLA_IN];   // 0 absent, 1 true, 2 complemented, 3 term off
  logic [PLA_TERMS-1:0] use_term [PLA_OUT];

  // cycle model
  logic [PLA_IN-1:0] m_x;
  logic [PLA_TERMS-1:0] m_z;
  logic [PLA_OUT-1:0] m_y;
  logic m_fb;

  function automatic logic [PLA_TERMS-1:0] ref_z(input logic [PLA_IN-1:0] xv);
    for (int i = 0; i < int'(PLA_TERMS); i++) begin
      ref_z[i] = 1'b1;
      for (int j = 0; j < int'(PLA_IN); j++)
        case (lit[i][j])
          2'd1: ref_z[i] &= xv[j];
          2'd2: ref_z[i] &= !xv[j];
          2'd3: ref_z[i] = 1'b0;
          default: ;
        endcase
    end
  endfunction

  function automatic logic [PLA_OUT-1:0] ref_y(input logic [PLA_TERMS-1:0] zv);
    for (int k = 0; k < int'(PLA_OUT); k++) ref_y[k] = |(use_term[k] & zv);
  endfunction

  // advance the model by one rising edge
  task automatic model_step();
    logic [PLA_IN-1:0] xp;
    logic [PLA_OUT-1:0] yc;
    xp = m_x;
    if (fb_en) xp[PLA_IN-1] = m_fb;
    yc = ref_y(m_z);
    m_z = ref_z(xp);
    m_x = x_in;
    m_y = yc;
    m_fb = yc[PLA_OUT-1];
  endtask

  task automatic load();
    for (int c = 0; c < 10; c++) begin
      @(negedge clk);
      sel_and = 1'b1; sel_or = 1'b0; cas = 1'b1; col_addr = 4'(c);
      for (int i = 0; i < int'(PLA_TERMS); i++) begin
        logic [1:0] l;
        l = lit[i][c/2];
        prog_data[i] = (c % 2 == 0) ? (l == 2'd2 || l == 2'd3) : (l == 2'd1 || l == 2'd3);
      end
    end
    for (int c = 0; c < int'(PLA_TERMS); c++) begin
      @(negedge clk);
      sel_and = 1'b0; sel_or = 1'b1; cas = 1'b1; col_addr = 4'(c);
      prog_data = '0;
      for (int k = 0; k < int'(PLA_OUT); k++) prog_data[k] = use_term[k][c];
    end
    @(negedge clk); sel_and = 1'b0; sel_or = 1'b0; cas = 1'b0;
  endtask

  task automatic reset_all();
    rst_n = 1'b0;
    m_x = '0; m_z = '0; m_y = '0; m_fb = 1'b0;
    @(negedge clk); rst_n = 1'b1;
  endtask

  // run n cycles with random inputs, compare every cycle
  task automatic run_random(input int n);
    for (int c = 0; c < n; c++) begin
      x_in = PLA_IN'($urandom);
      @(posedge clk); model_step();
      @(negedge clk);
      checks++;
      if (y_out !== m_y) begin failures++; $display("FAIL cycle y=%b exp=%b fb_en=%b", y_out, m_y, fb_en); end
    end
  endtask

  task automatic clear_prog();
    for (int i = 0; i < int'(PLA_TERMS); i++) for (int j = 0; j < int'(PLA_IN); j++) lit[i][j] = 2'd3;
    for (int k = 0; k < int'(PLA_OUT); k++) use_term[k] = '0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, toggles;
    logic prev;
    rst_n = 1'b0; fb_en = 0; sel_and = 0; sel_or = 0; cas = 0; col_addr = 0; prog_data = 0; x_in = 0;

    // --- latency: y0 = x0 x1 -------------------------------------------------
    clear_prog();
    for (int j = 0; j < int'(PLA_IN); j++) lit[0][j] = 2'd0;
    lit[0][0] = 2'd1; lit[0][1] = 2'd1;
    use_term[0] = 10'b1;
    load();
    reset_all();
    repeat (4) @(negedge clk);
    x_in = 5'b00011;
    lat = 0;
    do begin @(negedge clk); lat++; end while (y_out[0] !== 1'b1 && lat < 10);
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d cycles, expected 3", lat); end
    x_in = '0;

    // --- random logic, feedback off and on --------------------------------------
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < int'(PLA_TERMS); i++)
        for (int j = 0; j < int'(PLA_IN); j++)
          lit[i][j] = ($urandom % 8 == 0) ? 2'd3 : 2'($urandom % 3);
      for (int k = 0; k < int'(PLA_OUT); k++) use_term[k] = PLA_TERMS'($urandom) & PLA_TERMS'($urandom);
      fb_en = t[0];
      load();
      reset_all();
      run_random(60);
    end

    // --- one-bit state machine: y5 = ~x4 with feedback, y1 = x4 -----------------
    clear_prog();
    for (int j = 0; j < int'(PLA_IN); j++) begin lit[0][j] = 2'd0; lit[1][j] = 2'd0; end
    lit[0][4] = 2'd2;                 // z0 = ~x4
    lit[1][4] = 2'd1;                 // z1 = x4
    use_term[5] = 10'b01;             // y5 = z0
    use_term[1] = 10'b10;             // y1 = z1
    fb_en = 1'b1;
    load();
    reset_all();
    x_in = '0;
    toggles = 0;
    prev = y_out[5];
    for (int c = 0; c < 40; c++) begin
      @(posedge clk); model_step();
      @(negedge clk);
      checks++;
      if (y_out !== m_y) begin failures++; $display("FAIL fsm y=%b exp=%b", y_out, m_y); end
      if (y_out[5] != prev) toggles++;
      prev = y_out[5];
    end
    checks++;
    if (toggles < 10) begin failures++; $display("FAIL feedback state toggled only %0d times", toggles); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
