// ind_parity_gen_tb: checks the I3D and I2D parity generators against a reference that
// walks the frame grid cell by cell, on random frames and on the multiple-bit-upset
// patterns of the worked comparison of I2D with plain 2-D parity (distances 4/3/5).
// Parity is linear, so an upset pattern goes undetected exactly when its own parity is 0.
module ind_parity_gen_tb;
  localparam int unsigned WORDS = 81, W = 32, V = 4, H = 3, D = 5;
  localparam int unsigned PW3 = V + H + D, PW2 = V + H;

  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, in_valid = 1'b0;
  logic [6:0]     in_row = '0;
  logic [W-1:0]   in_word = '0;
  logic [PW3-1:0] par3;
  logic [PW2-1:0] par2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts at once

  ind_parity_gen #(.WORDS(WORDS), .W(W), .V(V), .H(H), .D(D), .USE_DIAG(1'b1)) u_i3d (
    .clk, .rst_n, .clear, .in_valid, .in_row, .in_word, .parity(par3));
  ind_parity_gen #(.WORDS(WORDS), .W(W), .V(V), .H(H), .D(D), .USE_DIAG(1'b0)) u_i2d (
    .clk, .rst_n, .clear, .in_valid, .in_row, .in_word, .parity(par2));

  logic [W-1:0] frame [WORDS];

  // Reference: one group counter per parity bit, filled cell by cell.
  function automatic logic [PW3-1:0] ref_parity();
    logic [PW3-1:0] p = '0;
    for (int r = 0; r < int'(WORDS); r++)
      for (int c = 0; c < int'(W); c++)
        if (frame[r][c]) begin
          p[c % V]               = ~p[c % V];
          p[V + (r % H)]         = ~p[V + (r % H)];
          p[V + H + ((r + c) % D)] = ~p[V + H + ((r + c) % D)];
        end
    return p;
  endfunction

  task automatic stream_frame();
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int r = 0; r < int'(WORDS); r++) begin
      in_valid = 1'b1; in_row = 7'(r); in_word = frame[r];
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Upset pattern: list of (row, col) cells, placed at an offset in an empty frame.
  task automatic pattern(input string name, input int cells[][2], input int r0, input int c0,
                         input bit i2d_detects, input bit i3d_detects);
    foreach (frame[r]) frame[r] = '0;
    foreach (cells[i]) frame[r0 + cells[i][0]][c0 + cells[i][1]] = 1'b1;
    stream_frame();
    check({name, " I3D parity = reference"}, par3 == ref_parity());
    check({name, " I2D detection"}, (par2 != '0) == i2d_detects);
    check({name, " I3D detection"}, (par3 != '0) == i3d_detects);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Random frames.
    for (int t = 0; t < 40; t++) begin
      foreach (frame[r]) frame[r] = $urandom();
      stream_frame();
      check("random frame I3D", par3 == ref_parity());
      check("random frame I2D", par2 == ref_parity()[PW2-1:0]);
    end

    // Timing: a word is in parity the cycle after it is accepted.
    foreach (frame[r]) frame[r] = '0;
    stream_frame();
    @(negedge clk) begin in_valid = 1'b1; in_row = 7'd0; in_word = 32'h1; end
    @(negedge clk) in_valid = 1'b0;
    check("one-cycle latency", par3 == ((12'(1) << 0) | (12'(1) << V) | (12'(1) << (V + H))));

    // Upset patterns of the worked comparison (grid of 4 rows x 5 columns).
    pattern("b: corners (0,0),(3,4)", '{'{0,0}, '{3,4}}, 0, 0, 1'b0, 1'b1);
    pattern("d: 2x2 square", '{'{1,2}, '{1,3}, '{2,2}, '{2,3}}, 0, 0, 1'b0, 1'b1);
    pattern("c: staircase", '{'{0,0}, '{1,1}, '{1,2}, '{1,3}, '{2,2}, '{2,3}, '{3,4}}, 0, 0, 1'b1, 1'b1);
    pattern("c: 2x3 block", '{'{1,1}, '{1,2}, '{1,3}, '{2,1}, '{2,2}, '{2,3}}, 0, 0, 1'b1, 1'b1);
    pattern("d: 2x2 square elsewhere", '{'{0,0}, '{0,1}, '{1,0}, '{1,1}}, 40, 17, 1'b0, 1'b1);

    // Every single-bit upset is detected by both.
    for (int t = 0; t < 30; t++) begin
      int rr, cc;
      rr = $urandom_range(WORDS - 1);
      cc = $urandom_range(W - 1);
      pattern("single bit", '{'{0,0}}, rr, cc, 1'b1, 1'b1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
