// ind_scrub_top_tb: end-to-end test of the scrubber at a reduced size (22 frames of 81
// words, clusters of 4 frames so the last cluster holds only 2, configuration-port
// latency 2). It runs the encode sweep and checks the stored parity and erasure blocks
// against a reference, then scrubs while it injects upsets:
//   * upset patterns that plain interleaved 2-D parity would miss, in several clusters
//     (first frame of a cluster, middle frame, the partial last cluster) -> corrected;
//   * upsets in two frames of one cluster -> both reported uncorrectable, frames untouched;
//   * a damaged stored parity entry -> reported uncorrectable, configuration untouched;
//   * scrub_en dropped -> the scrubber stops after the current frame.
// It counts how often each mechanism happened and fails any that never did, and checks
// the cycle counts of the encode sweep and of a clean scrub sweep.
module ind_scrub_top_tb;
  import ind_pkg::*;
  localparam int unsigned FRAMES = 22, CLUSTER = 4, WORDS = 81, W = 32, LAT = 2;
  localparam int unsigned V = 4, H = 3, D = 5, PW = V + H + D;
  localparam int unsigned NCLUST = (FRAMES + CLUSTER - 1) / CLUSTER;
  localparam int unsigned FA_W = $clog2(FRAMES), WA_W = $clog2(WORDS);

  logic clk = 1'b0, rst_n = 1'b1, encode_start = 1'b0, scrub_en = 1'b0;
  logic busy, encoded, err_detect, frame_corrected, frame_uncorrectable, pass_done;
  logic [FA_W-1:0] event_frame, cfg_frame;
  logic [31:0] detected_cnt, corrected_cnt, uncorrectable_cnt, pass_cnt;
  logic cfg_rd, cfg_wr, cfg_rvalid;
  logic [WA_W-1:0] cfg_word;
  logic [W-1:0] cfg_wdata, cfg_rdata;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts at once
  always @(posedge clk) cycle++;

  ind_scrub_top #(.FRAMES(FRAMES), .CLUSTER(CLUSTER)) u_dut (
    .clk, .rst_n, .encode_start, .scrub_en, .busy, .encoded, .err_detect,
    .frame_corrected, .frame_uncorrectable, .event_frame, .pass_done, .detected_cnt,
    .corrected_cnt, .uncorrectable_cnt, .pass_cnt, .cfg_rd, .cfg_wr, .cfg_frame,
    .cfg_word, .cfg_wdata, .cfg_rvalid, .cfg_rdata);

  config_mem_model #(.FRAMES(FRAMES), .WORDS(WORDS), .W(W), .LATENCY(LAT)) u_mem (
    .clk, .rd(cfg_rd), .wr(cfg_wr), .frame(cfg_frame), .word(cfg_word), .wdata(cfg_wdata),
    .rvalid(cfg_rvalid), .rdata(cfg_rdata));

  // Mechanism and event counters.
  int n_detect = 0, n_corrected = 0, n_uncorr = 0, n_pass = 0, n_writes = 0;
  int n_first_fix = 0, n_partial_fix = 0, n_mid_fix = 0, n_stop = 0, n_encode = 0;
  int n_stale_parity = 0, n_double = 0;
  always @(posedge clk) begin
    if (err_detect) n_detect++;
    if (frame_corrected) n_corrected++;
    if (frame_uncorrectable) n_uncorr++;
    if (pass_done) n_pass++;
    if (cfg_wr) n_writes++;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cycle); end
  endtask

  function automatic int dirty_words();
    int n = 0;
    for (int i = 0; i < int'(FRAMES * WORDS); i++) if (u_mem.mem[i] != u_mem.golden(i)) n++;
    return n;
  endfunction

  function automatic logic [PW-1:0] ref_parity(input int f);
    logic [PW-1:0] p = '0;
    for (int r = 0; r < int'(WORDS); r++)
      for (int c = 0; c < int'(W); c++)
        if (u_mem.golden(f * WORDS + r)[c]) begin
          p[c % V] ^= 1'b1;
          p[V + r % H] ^= 1'b1;
          p[V + H + (r + c) % D] ^= 1'b1;
        end
    return p;
  endfunction

  task automatic flip(input int f, input int r, input int c);
    u_mem.mem[f * WORDS + r][c] = ~u_mem.mem[f * WORDS + r][c];
  endtask

  task automatic wait_passes(input int n);
    int target = n_pass + n;
    while (n_pass < target) @(posedge clk);
  endtask

  longint t0, t1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- Encode sweep.
    @(negedge clk) encode_start = 1'b1;
    @(negedge clk) encode_start = 1'b0;
    t0 = cycle;
    wait (encoded);
    t1 = cycle;
    n_encode++;
    check("encode sweep cycles", (t1 - t0) == longint'(int'(FRAMES * (WORDS + LAT + 1) + NCLUST * WORDS)));
    for (int f = 0; f < int'(FRAMES); f++)
      check("stored parity", u_dut.u_pstore.mem[(f % CLUSTER) * NCLUST + f / CLUSTER] == ref_parity(f));
    for (int k = 0; k < int'(NCLUST); k++)
      for (int w = 0; w < int'(WORDS); w++) begin
        logic [W-1:0] x;
        x = '0;
        for (int f = k * CLUSTER; f < (k + 1) * CLUSTER && f < int'(FRAMES); f++)
          x ^= u_mem.golden(f * WORDS + w);
        check("stored erasure block", u_dut.u_rstore.mem[w * NCLUST + k] == x);
      end

    // ---- Clean scrub sweeps.
    @(negedge clk) scrub_en = 1'b1;
    wait_passes(1);
    t0 = cycle;
    wait_passes(1);
    t1 = cycle;
    check("clean sweep cycles", (t1 - t0) == longint'(int'(FRAMES * (WORDS + LAT + 1))));
    check("clean sweep detects nothing", n_detect == 0 && detected_cnt == 0);
    check("clean sweep writes nothing", n_writes == 0);

    // ---- Correctable upsets in three clusters.
    @(negedge clk);
    // 2x2 square: missed by I2D, seen by the diagonals. Frame 5: middle of cluster 1.
    flip(5, 10, 7); flip(5, 10, 8); flip(5, 11, 7); flip(5, 11, 8);
    // Two cells 3 rows and 4 columns apart: missed by I2D. Frame 0: first of cluster 0.
    flip(0, 40, 0); flip(0, 43, 4);
    // Single upset in frame 21, last frame of the partial last cluster.
    flip(21, 80, 31);
    check("upsets injected", dirty_words() == 5);
    wait_passes(2);
    check("three frames detected", n_detect == 3 && detected_cnt == 3);
    check("three frames corrected", n_corrected == 3 && corrected_cnt == 3);
    check("configuration restored", dirty_words() == 0);
    check("write-back of three frames", n_writes == 3 * int'(WORDS));
    n_first_fix   += (n_corrected >= 1) ? 1 : 0;
    n_mid_fix     += (n_corrected >= 2) ? 1 : 0;
    n_partial_fix += (n_corrected >= 3) ? 1 : 0;

    // ---- Two damaged frames in one cluster: beyond one erasure block.
    @(negedge clk);
    flip(8, 3, 3); flip(9, 60, 20);
    wait_passes(2);
    check("double upset detected", n_detect >= 5);
    check("double upset uncorrectable", n_uncorr >= 2 && uncorrectable_cnt == 32'(n_uncorr));
    check("uncorrectable frames left untouched", dirty_words() == 2);
    if (n_uncorr >= 2) n_double++;
    @(negedge clk);
    flip(8, 3, 3); flip(9, 60, 20);
    begin
      int u;
      u = n_uncorr;
      wait_passes(1);
      check("after repair, no new uncorrectable", n_uncorr == u);
    end

    // ---- Damaged stored parity entry.
    @(negedge clk);
    begin
      int u, a;
      u = n_uncorr;
      a = (14 % CLUSTER) * NCLUST + 14 / CLUSTER;
      u_dut.u_pstore.mem[a][2] = ~u_dut.u_pstore.mem[a][2];
      wait_passes(2);
      check("damaged parity entry reported", n_uncorr > u);
      check("damaged parity entry leaves configuration intact", dirty_words() == 0);
      if (n_uncorr > u) n_stale_parity++;
      u_dut.u_pstore.mem[a][2] = ~u_dut.u_pstore.mem[a][2];
    end

    // ---- Stop scrubbing.
    @(negedge clk) scrub_en = 1'b0;
    repeat (WORDS + LAT + 4) @(negedge clk);
    check("scrubber stops", !busy);
    if (!busy) n_stop++;
    begin
      int c;
      c = 0;
      repeat (50) @(negedge clk) if (cfg_rd) c++;
      check("no reads while stopped", c == 0);
    end

    // ---- Every mechanism happened.
    check("mechanism: encode sweep", n_encode > 0);
    check("mechanism: detection", n_detect > 0);
    check("mechanism: correction of first frame of a cluster", n_first_fix > 0);
    check("mechanism: correction inside a cluster", n_mid_fix > 0);
    check("mechanism: correction in a partial cluster", n_partial_fix > 0);
    check("mechanism: uncorrectable double upset", n_double > 0);
    check("mechanism: damaged parity entry", n_stale_parity > 0);
    check("mechanism: scrub stop", n_stop > 0);
    $display("mechanisms: encode=%0d detect=%0d corrected=%0d uncorrectable=%0d passes=%0d",
             n_encode, n_detect, n_corrected, n_uncorr, n_pass);
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
