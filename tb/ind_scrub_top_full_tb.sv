// ind_scrub_top_full_tb: the scrubber at its default size (28464 frames of 81 words,
// clusters of 48 frames) against a full-size configuration memory model. It runs the
// encode sweep, injects a 2x2 multiple-bit upset into one frame and a single upset into
// the very last frame, runs one complete scrub sweep and checks that both frames were
// detected, rebuilt from their clusters and written back, leaving the memory as it was.
// It also checks the cycle counts of the encode sweep.
module ind_scrub_top_full_tb;
  import ind_pkg::*;
  localparam int unsigned FRAMES = NUM_FRAMES, WORDS = FRAME_WORDS, W = WORD_W, LAT = 1;
  localparam int unsigned NCLUST = (FRAMES + CLUSTER_FRAMES - 1) / CLUSTER_FRAMES;
  localparam int unsigned FA_W = $clog2(FRAMES), WA_W = $clog2(WORDS);

  logic clk = 1'b0, rst_n = 1'b1, encode_start = 1'b0, scrub_en = 1'b0;
  logic busy, encoded, err_detect, frame_corrected, frame_uncorrectable, pass_done;
  logic [FA_W-1:0] event_frame, cfg_frame;
  logic [31:0] detected_cnt, corrected_cnt, uncorrectable_cnt, pass_cnt;
  logic cfg_rd, cfg_wr, cfg_rvalid;
  logic [WA_W-1:0] cfg_word;
  logic [W-1:0] cfg_wdata, cfg_rdata;
  int checks = 0, failures = 0;
  longint cycle = 0, t0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts at once
  always @(posedge clk) cycle++;

  ind_scrub_top u_dut (
    .clk, .rst_n, .encode_start, .scrub_en, .busy, .encoded, .err_detect,
    .frame_corrected, .frame_uncorrectable, .event_frame, .pass_done, .detected_cnt,
    .corrected_cnt, .uncorrectable_cnt, .pass_cnt, .cfg_rd, .cfg_wr, .cfg_frame,
    .cfg_word, .cfg_wdata, .cfg_rvalid, .cfg_rdata);

  config_mem_model #(.FRAMES(FRAMES), .WORDS(WORDS), .W(W), .LATENCY(LAT)) u_mem (
    .clk, .rd(cfg_rd), .wr(cfg_wr), .frame(cfg_frame), .word(cfg_word), .wdata(cfg_wdata),
    .rvalid(cfg_rvalid), .rdata(cfg_rdata));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int dirty_words();
    int n = 0;
    for (int i = 0; i < int'(FRAMES * WORDS); i++) if (u_mem.mem[i] != u_mem.golden(i)) n++;
    return n;
  endfunction

  task automatic flip(input int f, input int r, input int c);
    u_mem.mem[f * WORDS + r][c] = ~u_mem.mem[f * WORDS + r][c];
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) encode_start = 1'b1;
    @(negedge clk) encode_start = 1'b0;
    t0 = cycle;
    wait (encoded);
    check("encode sweep cycles",
          (cycle - t0) == longint'(int'(FRAMES * (WORDS + LAT + 1) + NCLUST * WORDS)));
    $display("encode sweep: %0d cycles", cycle - t0);

    flip(12345, 40, 20); flip(12345, 40, 21); flip(12345, 41, 20); flip(12345, 41, 21);
    flip(FRAMES - 1, 80, 0);
    check("upsets injected", dirty_words() == 3);

    @(negedge clk) scrub_en = 1'b1;
    t0 = cycle;
    @(posedge pass_done);
    @(negedge clk) scrub_en = 1'b0;
    $display("scrub sweep with two recoveries: %0d cycles", cycle - t0);
    check("two frames detected", detected_cnt == 2);
    check("two frames corrected", corrected_cnt == 2 && uncorrectable_cnt == 0);
    check("one sweep completed", pass_cnt == 1);
    check("configuration restored", dirty_words() == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
