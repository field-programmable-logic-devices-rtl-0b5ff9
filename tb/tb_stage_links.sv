// tb_stage_links: self-checking test of the wiring between the two stages.
// The expected wiring is rebuilt here from the link table (first-stage cell a
// sends links 0..3 to second-stage cells {0,0,1,2}, {0,1,1,2}, {0,1,2,2}; each
// second-stage cell numbers its inputs in order of source cell and link). With
// link_en high every used input must carry its first-stage output, and every
// second-stage cell must hear from all three first-stage cells (the Clos
// property); with link_en low the die inputs pass straight through.
module tb_stage_links;
  import fpld_pkg::*;
  int checks = 0, failures = 0;

  logic link_en;
  logic [2:0][PLA_OUT-1:0] s1_y;
  logic [2:0][PLA_IN-1:0]  pin_x, s2_x;

  stage_links dut (.link_en(link_en), .s1_y(s1_y), .pin_x(pin_x), .s2_x(s2_x));

  int dst [3][4] = '{'{0, 0, 1, 2}, '{0, 1, 1, 2}, '{0, 1, 2, 2}};
  int src_a [3][4];
  int src_j [3][4];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the receive-side table
    for (int b = 0; b < 3; b++) begin
      int k;
      k = 0;
      for (int a = 0; a < 3; a++)
        for (int j = 0; j < 4; j++)
          if (dst[a][j] == b) begin src_a[b][k] = a; src_j[b][k] = j; k++; end
      checks++;
      if (k != 4) begin failures++; $display("FAIL table: cell %0d has %0d links", b, k); end
    end

    for (int t = 0; t < 200; t++) begin
      s1_y = 18'($urandom);
      pin_x = 15'($urandom);
      link_en = t[0];
      #1;
      for (int b = 0; b < 3; b++) begin
        for (int k = 0; k < 4; k++) begin
          logic e;
          e = link_en ? s1_y[src_a[b][k]][src_j[b][k] + 1] : pin_x[b][k];
          checks++;
          if (s2_x[b][k] !== e) begin failures++; $display("FAIL b=%0d k=%0d en=%b", b, k, link_en); end
        end
        checks++;
        if (s2_x[b][4] !== pin_x[b][4]) begin failures++; $display("FAIL b=%0d x4", b); end
      end
    end

    // Clos property by probing: a single 1 on each first-stage output
    link_en = 1'b1; pin_x = '0;
    for (int b = 0; b < 3; b++) begin
      int seen;
      seen = 0;
      for (int a = 0; a < 3; a++)
        for (int j = 1; j <= 4; j++) begin
          s1_y = '0; s1_y[a][j] = 1'b1; #1;
          if (s2_x[b][3:0] != 0) seen |= (1 << a);
        end
      checks++;
      if (seen != 7) begin failures++; $display("FAIL cell %0d reached from set %b", b, seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
