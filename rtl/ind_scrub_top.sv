// ind_scrub_top: configuration-frame scrubber with InD parity detection and
// erasure-code recovery.
//
// The core sits beside the user design and reaches the device's configuration memory
// through the cfg_* port. It keeps, in its own block RAMs, the InD (here I3D) parity bits
// of every frame and one redundant erasure block (the XOR of all frames) per cluster of
// CLUSTER frames. encode_start sweeps all frames once to build those data. With scrub_en
// high it sweeps the frames over and over: a frame whose parity no longer matches is
// assumed erased and is rebuilt from its cluster's erasure block and the other frames of
// the cluster, then written back.
//
// Blocks: scrub_ctrl (sequencing), ind_parity_gen (parity of the streamed frame),
// erasure_buffer (one-frame XOR accumulator), parity_store and redundant_store (the two
// cluster-interleaved block RAMs). Defaults: 28464 frames of 81 32-bit words (a Virtex-6
// XC6VLX240T), interleaving distances 4/3/5 and clusters of 48 frames (this design's
// choice). Port timing is described in scrub_ctrl.
module ind_scrub_top
  import ind_pkg::*;
#(
  parameter int unsigned FRAMES   = NUM_FRAMES,
  parameter int unsigned CLUSTER  = CLUSTER_FRAMES,
  parameter int unsigned WORDS    = FRAME_WORDS,
  parameter int unsigned W        = WORD_W,
  parameter int unsigned V        = DIST_V,
  parameter int unsigned H        = DIST_H,
  parameter int unsigned D        = DIST_D,
  parameter bit          USE_DIAG = 1'b1,
  parameter int unsigned PW       = parity_width(V, H, D, USE_DIAG),
  parameter int unsigned NCLUST   = (FRAMES + CLUSTER - 1) / CLUSTER,
  parameter int unsigned FA_W     = $clog2(FRAMES),
  parameter int unsigned CA_W     = (NCLUST > 1) ? $clog2(NCLUST) : 1,
  parameter int unsigned PA_W     = (CLUSTER > 1) ? $clog2(CLUSTER) : 1,
  parameter int unsigned WA_W     = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            encode_start,
  input  logic            scrub_en,
  output logic            busy,
  output logic            encoded,
  output logic            err_detect,
  output logic            frame_corrected,
  output logic            frame_uncorrectable,
  output logic [FA_W-1:0] event_frame,
  output logic            pass_done,
  output logic [31:0]     detected_cnt,
  output logic [31:0]     corrected_cnt,
  output logic [31:0]     uncorrectable_cnt,
  output logic [31:0]     pass_cnt,
  output logic            cfg_rd,
  output logic            cfg_wr,
  output logic [FA_W-1:0] cfg_frame,
  output logic [WA_W-1:0] cfg_word,
  output logic [W-1:0]    cfg_wdata,
  input  logic            cfg_rvalid,
  input  logic [W-1:0]    cfg_rdata
);

  logic            pg_clear, pg_valid;
  logic [WA_W-1:0] pg_row;
  logic [W-1:0]    pg_word;
  logic [PW-1:0]   pg_parity;

  logic            bf_wr_en, bf_wr_xor;
  logic [WA_W-1:0] bf_wr_addr, bf_rd_addr;
  logic [W-1:0]    bf_wr_data, bf_rd_data;

  logic            ps_rd_en, ps_rd_valid, ps_wr_en;
  logic [CA_W-1:0] ps_rd_cluster, ps_wr_cluster;
  logic [PA_W-1:0] ps_rd_pos, ps_wr_pos;
  logic [PW-1:0]   ps_rd_data, ps_wr_data;

  logic            rs_rd_en, rs_rd_valid, rs_wr_en;
  logic [CA_W-1:0] rs_rd_cluster, rs_wr_cluster;
  logic [WA_W-1:0] rs_rd_word, rs_wr_word;
  logic [W-1:0]    rs_rd_data, rs_wr_data;

  scrub_ctrl #(
    .FRAMES(FRAMES), .CLUSTER(CLUSTER), .WORDS(WORDS), .W(W), .PW(PW),
    .NCLUST(NCLUST), .FA_W(FA_W), .CA_W(CA_W), .PA_W(PA_W), .WA_W(WA_W)
  ) u_ctrl (
    .clk, .rst_n, .encode_start, .scrub_en, .busy, .encoded, .err_detect,
    .frame_corrected, .frame_uncorrectable, .event_frame, .pass_done,
    .detected_cnt, .corrected_cnt, .uncorrectable_cnt, .pass_cnt,
    .cfg_rd, .cfg_wr, .cfg_frame, .cfg_word, .cfg_wdata, .cfg_rvalid, .cfg_rdata,
    .pg_clear, .pg_valid, .pg_row, .pg_word, .pg_parity,
    .bf_wr_en, .bf_wr_xor, .bf_wr_addr, .bf_wr_data, .bf_rd_addr, .bf_rd_data,
    .ps_rd_en, .ps_rd_cluster, .ps_rd_pos, .ps_rd_data, .ps_rd_valid,
    .ps_wr_en, .ps_wr_cluster, .ps_wr_pos, .ps_wr_data,
    .rs_rd_en, .rs_rd_cluster, .rs_rd_word, .rs_rd_data, .rs_rd_valid,
    .rs_wr_en, .rs_wr_cluster, .rs_wr_word, .rs_wr_data
  );

  ind_parity_gen #(
    .WORDS(WORDS), .W(W), .V(V), .H(H), .D(D), .USE_DIAG(USE_DIAG), .PW(PW), .ROW_W(WA_W)
  ) u_pgen (
    .clk, .rst_n, .clear(pg_clear), .in_valid(pg_valid), .in_row(pg_row),
    .in_word(pg_word), .parity(pg_parity)
  );

  erasure_buffer #(.WORDS(WORDS), .W(W), .ADDR_W(WA_W)) u_buf (
    .clk, .wr_en(bf_wr_en), .wr_xor(bf_wr_xor), .wr_addr(bf_wr_addr),
    .wr_data(bf_wr_data), .rd_addr(bf_rd_addr), .rd_data(bf_rd_data)
  );

  parity_store #(
    .FRAMES(FRAMES), .CLUSTER(CLUSTER), .PW(PW), .NCLUST(NCLUST), .CA_W(CA_W), .PA_W(PA_W)
  ) u_pstore (
    .clk, .rst_n, .rd_en(ps_rd_en), .rd_cluster(ps_rd_cluster), .rd_pos(ps_rd_pos),
    .rd_data(ps_rd_data), .rd_valid(ps_rd_valid), .wr_en(ps_wr_en),
    .wr_cluster(ps_wr_cluster), .wr_pos(ps_wr_pos), .wr_data(ps_wr_data)
  );

  redundant_store #(
    .NCLUST(NCLUST), .WORDS(WORDS), .W(W), .CA_W(CA_W), .WA_W(WA_W)
  ) u_rstore (
    .clk, .rst_n, .rd_en(rs_rd_en), .rd_cluster(rs_rd_cluster), .rd_word(rs_rd_word),
    .rd_data(rs_rd_data), .rd_valid(rs_rd_valid), .wr_en(rs_wr_en),
    .wr_cluster(rs_wr_cluster), .wr_word(rs_wr_word), .wr_data(rs_wr_data)
  );

endmodule
