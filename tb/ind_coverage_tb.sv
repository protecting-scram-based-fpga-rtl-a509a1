// ind_coverage_tb: detection coverage of interleaved parity codes on small multiple-bit
// upsets. Every pattern of 2, 3 or 4 flipped cells inside a 4-row by 5-column window
// (6175 patterns, all weighted alike) is streamed through four parity generators that
// share one input:
//   I2D 4/3  (7 bits)   I3D 2/2/3 (7 bits)   I2D 6/6 (12 bits)   I3D 4/3/5 (12 bits)
// Because parity is linear, a pattern is detected when its own parity is non-zero. The
// testbench checks each generator's parity against a cell-by-cell reference, checks that
// the default I3D 4/3/5 code sees every 2-cell pattern and every pattern its I2D 4/3
// subset sees, that at 12 bits the I3D code covers more patterns than the I2D code, and
// prints the coverage of each code by pattern size.
module ind_coverage_tb;
  localparam int unsigned WORDS = 81, W = 32, ROWS = 4, COLS = 5;

  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, in_valid = 1'b0;
  logic [6:0]   in_row = '0;
  logic [W-1:0] in_word = '0;
  logic [6:0]   p_a, p_b;
  logic [11:0]  p_c, p_d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts at once

  ind_parity_gen #(.WORDS(WORDS), .W(W), .V(4), .H(3), .D(5), .USE_DIAG(1'b0)) u_a (
    .clk, .rst_n, .clear, .in_valid, .in_row, .in_word, .parity(p_a));
  ind_parity_gen #(.WORDS(WORDS), .W(W), .V(2), .H(2), .D(3), .USE_DIAG(1'b1)) u_b (
    .clk, .rst_n, .clear, .in_valid, .in_row, .in_word, .parity(p_b));
  ind_parity_gen #(.WORDS(WORDS), .W(W), .V(6), .H(6), .D(5), .USE_DIAG(1'b0)) u_c (
    .clk, .rst_n, .clear, .in_valid, .in_row, .in_word, .parity(p_c));
  ind_parity_gen #(.WORDS(WORDS), .W(W), .V(4), .H(3), .D(5), .USE_DIAG(1'b1)) u_d (
    .clk, .rst_n, .clear, .in_valid, .in_row, .in_word, .parity(p_d));

  // Reference parity of a pattern for distances v, h and d (d = 0: no diagonals).
  function automatic logic [11:0] ref_par(input logic [ROWS*COLS-1:0] pat, input int v,
                                          input int h, input int d);
    logic [11:0] p = '0;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++)
        if (pat[r * COLS + c]) begin
          p[c % v] ^= 1'b1;
          p[v + r % h] ^= 1'b1;
          if (d > 0) p[v + h + (r + c) % d] ^= 1'b1;
        end
    return p;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok && failures < 20) $display("FAIL: %s", what);
    if (!ok) failures++;
  endtask

  int total [2:4];
  int seen_a [2:4], seen_b [2:4], seen_c [2:4], seen_d [2:4];

  initial begin
    for (int k = 2; k <= 4; k++) begin
      total[k] = 0; seen_a[k] = 0; seen_b[k] = 0; seen_c[k] = 0; seen_d[k] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 1; m < (1 << (ROWS * COLS)); m++) begin
      logic [ROWS*COLS-1:0] pat;
      int k;
      pat = (ROWS*COLS)'(m);
      k = $countones(pat);
      if (k < 2 || k > 4) continue;
      @(negedge clk) clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      for (int r = 0; r < int'(ROWS); r++) begin
        in_valid = 1'b1;
        in_row   = 7'(r);
        in_word  = W'(pat[r * COLS +: COLS]);
        @(negedge clk);
      end
      in_valid = 1'b0;
      check("I2D 4/3 parity", p_a == ref_par(pat, 4, 3, 0)[6:0]);
      check("I3D 2/2/3 parity", p_b == ref_par(pat, 2, 2, 3)[6:0]);
      check("I2D 6/6 parity", p_c == ref_par(pat, 6, 6, 0));
      check("I3D 4/3/5 parity", p_d == ref_par(pat, 4, 3, 5));
      if (k == 2) check("I3D 4/3/5 sees every 2-cell upset", p_d != '0);
      if (p_a != '0) check("I3D 4/3/5 sees what I2D 4/3 sees", p_d != '0);
      total[k]++;
      if (p_a != '0) seen_a[k]++;
      if (p_b != '0) seen_b[k]++;
      if (p_c != '0) seen_c[k]++;
      if (p_d != '0) seen_d[k]++;
    end
    check("at 12 bits, I3D 4/3/5 covers more than I2D 6/6",
          seen_d[2] + seen_d[3] + seen_d[4] > seen_c[2] + seen_c[3] + seen_c[4]);
    check("pattern count", total[2] == 190 && total[3] == 1140 && total[4] == 4845);
    $display("coverage over all 2..4-cell patterns in a 4x5 window (detected / patterns)");
    $display("cells  I2D 4/3 (7b)  I3D 2/2/3 (7b)  I2D 6/6 (12b)  I3D 4/3/5 (12b)");
    for (int k = 2; k <= 4; k++)
      $display("%5d  %5d/%0d  %6d/%0d  %6d/%0d  %7d/%0d", k, seen_a[k], total[k],
               seen_b[k], total[k], seen_c[k], total[k], seen_d[k], total[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
