// scrub_ctrl_tb: checks the scrubber controller's sequencing at the configuration port,
// around the real parity generator, erasure buffer and stores (10 frames, clusters of 3,
// so the last cluster holds a single frame; port latency 1). It checks that:
//   * scrub_en is ignored until an encode sweep has run;
//   * a scrub sweep reads frames 0..9 in order, words 0..80 in order; a frame check
//     started from idle takes WORDS + 3 cycles;
//   * a stopped sweep resumes at the next frame;
//   * recovering frame 4 reads exactly the surviving frames 3 and 5 of its cluster, then
//     writes frame 4 words 0..80 in order, and reports frame 4 as detected and corrected;
//   * the single-frame cluster (frame 9) is rebuilt from its erasure block alone.
module scrub_ctrl_tb;
  import ind_pkg::*;
  localparam int unsigned FRAMES = 10, CLUSTER = 3, WORDS = 81, W = 32, PW = 12;
  localparam int unsigned NCLUST = (FRAMES + CLUSTER - 1) / CLUSTER;
  localparam int unsigned FA_W = $clog2(FRAMES), CA_W = $clog2(NCLUST), WA_W = $clog2(WORDS);

  logic clk = 1'b0, rst_n = 1'b1, encode_start = 1'b0, scrub_en = 1'b0;
  logic busy, encoded, err_detect, frame_corrected, frame_uncorrectable, pass_done;
  logic [FA_W-1:0] event_frame, cfg_frame;
  logic [31:0] detected_cnt, corrected_cnt, uncorrectable_cnt, pass_cnt;
  logic cfg_rd, cfg_wr, cfg_rvalid;
  logic [WA_W-1:0] cfg_word;
  logic [W-1:0] cfg_wdata, cfg_rdata;

  logic pg_clear, pg_valid; logic [WA_W-1:0] pg_row; logic [W-1:0] pg_word; logic [PW-1:0] pg_parity;
  logic bf_wr_en, bf_wr_xor; logic [WA_W-1:0] bf_wr_addr, bf_rd_addr; logic [W-1:0] bf_wr_data, bf_rd_data;
  logic ps_rd_en, ps_rd_valid, ps_wr_en;
  logic [CA_W-1:0] ps_rd_cluster, ps_wr_cluster; logic [1:0] ps_rd_pos, ps_wr_pos;
  logic [PW-1:0] ps_rd_data, ps_wr_data;
  logic rs_rd_en, rs_rd_valid, rs_wr_en; logic [CA_W-1:0] rs_rd_cluster, rs_wr_cluster;
  logic [WA_W-1:0] rs_rd_word, rs_wr_word; logic [W-1:0] rs_rd_data, rs_wr_data;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts at once

  scrub_ctrl #(.FRAMES(FRAMES), .CLUSTER(CLUSTER), .WORDS(WORDS), .W(W), .PW(PW)) u_dut (.*);
  ind_parity_gen #(.WORDS(WORDS), .W(W)) u_pgen (
    .clk, .rst_n, .clear(pg_clear), .in_valid(pg_valid), .in_row(pg_row), .in_word(pg_word),
    .parity(pg_parity));
  erasure_buffer #(.WORDS(WORDS), .W(W)) u_buf (
    .clk, .wr_en(bf_wr_en), .wr_xor(bf_wr_xor), .wr_addr(bf_wr_addr), .wr_data(bf_wr_data),
    .rd_addr(bf_rd_addr), .rd_data(bf_rd_data));
  parity_store #(.FRAMES(FRAMES), .CLUSTER(CLUSTER), .PW(PW)) u_ps (
    .clk, .rst_n, .rd_en(ps_rd_en), .rd_cluster(ps_rd_cluster), .rd_pos(ps_rd_pos),
    .rd_data(ps_rd_data), .rd_valid(ps_rd_valid), .wr_en(ps_wr_en), .wr_cluster(ps_wr_cluster),
    .wr_pos(ps_wr_pos), .wr_data(ps_wr_data));
  redundant_store #(.NCLUST(NCLUST), .WORDS(WORDS), .W(W)) u_rs (
    .clk, .rst_n, .rd_en(rs_rd_en), .rd_cluster(rs_rd_cluster), .rd_word(rs_rd_word),
    .rd_data(rs_rd_data), .rd_valid(rs_rd_valid), .wr_en(rs_wr_en), .wr_cluster(rs_wr_cluster),
    .wr_word(rs_wr_word), .wr_data(rs_wr_data));
  config_mem_model #(.FRAMES(FRAMES), .WORDS(WORDS), .W(W), .LATENCY(1)) u_mem (
    .clk, .rd(cfg_rd), .wr(cfg_wr), .frame(cfg_frame), .word(cfg_word), .wdata(cfg_wdata),
    .rvalid(cfg_rvalid), .rdata(cfg_rdata));

  // Log of port accesses: frame * 128 + word, reads and writes apart.
  int rd_log[$], wr_log[$];
  int n_detect = 0, n_corr = 0, last_detect = -1, last_corr = -1;
  always @(posedge clk) begin
    if (cfg_rd) rd_log.push_back(int'(cfg_frame) * 128 + int'(cfg_word));
    if (cfg_wr) wr_log.push_back(int'(cfg_frame) * 128 + int'(cfg_word));
    if (err_detect) begin n_detect++; last_detect = int'(event_frame); end
    if (frame_corrected) begin n_corr++; last_corr = int'(event_frame); end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // The log must start with these frames, each read word 0..WORDS-1; at most two reads of
  // the next frame may follow (the sweep moves on while the testbench looks).
  function automatic bit reads_are(input int frames[$]);
    int i = 0;
    if (rd_log.size() < frames.size() * int'(WORDS) ||
        rd_log.size() > frames.size() * int'(WORDS) + 2) return 1'b0;
    foreach (frames[k])
      for (int w = 0; w < int'(WORDS); w++) begin
        if (rd_log[i] != frames[k] * 128 + w) return 1'b0;
        i++;
      end
    return 1'b1;
  endfunction

  function automatic bit writes_are(input int f);
    if (wr_log.size() != int'(WORDS)) return 1'b0;
    for (int w = 0; w < int'(WORDS); w++) if (wr_log[w] != f * 128 + w) return 1'b0;
    return 1'b1;
  endfunction

  task automatic wait_frame_done();
    // Wait until the controller is back at a frame boundary (reads of a new frame start).
    @(posedge clk);
    while (u_dut.state != S_SCR_CHECK && u_dut.state != S_IDLE) @(posedge clk);
  endtask

  int t0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // scrub_en before any encode sweep is ignored.
    @(negedge clk) scrub_en = 1'b1;
    repeat (20) @(negedge clk);
    check("no scrubbing before encode", !busy && rd_log.size() == 0);
    scrub_en = 1'b0;

    // Encode sweep reads every frame once, in order.
    @(negedge clk) encode_start = 1'b1;
    @(negedge clk) encode_start = 1'b0;
    wait (encoded);
    check("encode reads every frame in order", reads_are('{0,1,2,3,4,5,6,7,8,9}));
    check("encode writes nothing", wr_log.size() == 0);
    check("encode leaves the controller idle", !busy);

    // One clean sweep, timed frame by frame.
    rd_log.delete();
    @(negedge clk) scrub_en = 1'b1;
    @(posedge pass_done);
    check("clean sweep reads every frame in order", reads_are('{0,1,2,3,4,5,6,7,8,9}));
    @(negedge clk) scrub_en = 1'b0;
    wait (!busy);

    // Time one frame check: reads of frame 0 start the cycle after scrub_en.
    rd_log.delete();
    @(negedge clk) scrub_en = 1'b1;
    t0 = cyc;
    @(posedge clk);
    while (u_dut.state != S_SCR_CHECK) @(posedge clk);
    @(posedge clk);
    // One cycle to leave idle, WORDS + latency cycles of reads, one cycle of comparison.
    check("frame check takes WORDS + 3 cycles from idle", (cyc - t0) == int'(WORDS) + 3);
    scrub_en = 1'b0;
    wait (!busy);

    // Upset in frame 4 (cluster 1 = frames 3, 4, 5) and in frame 9 (a cluster of one).
    u_mem.mem[4 * WORDS + 17][9] = ~u_mem.mem[4 * WORDS + 17][9];
    u_mem.mem[9 * WORDS + 0][0]  = ~u_mem.mem[9 * WORDS + 0][0];
    rd_log.delete();
    wr_log.delete();
    @(negedge clk) scrub_en = 1'b1;
    // The sweep resumes where the timed run stopped; frames up to 4 are checked, then
    // frame 4 is rebuilt from frames 3 and 5.
    while (wr_log.size() < int'(WORDS)) @(posedge clk);
    @(posedge clk);
    begin
      int expect_frames[$];
      check("sweep resumed after frame 0", rd_log.size() > 0 && rd_log[0] / 128 >= 1);
      for (int f = rd_log[0] / 128; f <= 4; f++) expect_frames.push_back(f);
      expect_frames.push_back(3);
      expect_frames.push_back(5);
      check("recovery reads: sweep up to 4, then survivors 3 and 5", reads_are(expect_frames));
    end
    check("recovery writes frame 4 in order", writes_are(4));
    check("frame 4 detected", n_detect == 1 && last_detect == 4);
    @(posedge clk);
    check("frame 4 corrected", n_corr == 1 && last_corr == 4);
    check("frame 4 restored", u_mem.mem[4 * WORDS + 17] == u_mem.golden(4 * WORDS + 17));
    wr_log.delete();
    @(posedge pass_done);
    @(posedge clk);
    @(negedge clk);
    check("frame 9 rebuilt from its erasure block alone", writes_are(9) && n_corr == 2 && last_corr == 9);
    check("frame 9 restored", u_mem.mem[9 * WORDS] == u_mem.golden(9 * WORDS));
    check("counters", detected_cnt == 2 && corrected_cnt == 2 && uncorrectable_cnt == 0);
    scrub_en = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
