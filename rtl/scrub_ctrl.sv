// scrub_ctrl: controller of the InD-parity / erasure-code configuration scrubber.
//
// It runs two kinds of sweep over the configuration frames, one frame at a time:
//  * Encode (encode_start): every frame is read once; its InD parity goes to the parity
//    store and the XOR of the frames of each cluster goes to the redundant store as the
//    cluster's erasure block. The document produces these data once, in advance, when the
//    design is mapped; doing it with a sweep in hardware is this design's choice.
//  * Scrub (scrub_en held high): frames are read in turn and their parity is generated
//    and compared with the stored parity. On a mismatch the frame is treated as erased:
//    the buffer is loaded with the cluster's erasure block, every other frame of the
//    cluster is XORed in. The rebuilt frame's parity is generated and compared with the
//    stored parity: on a match the frame is written back and counted as corrected; on a
//    mismatch it is counted as uncorrectable and the frame is left as it was (more than
//    one damaged frame in the cluster, or damaged parity or redundant data). Checking the
//    rebuilt frame before writing it is this design's choice.
//    Sweeps repeat while scrub_en is high; scrub_en low stops after the current frame.
//
// Configuration port: one access per cycle, no back-pressure. cfg_rd with cfg_frame and
// cfg_word asks for a word; the port answers with cfg_rvalid and cfg_rdata, in order,
// after any fixed latency of one cycle or more. cfg_wr writes cfg_wdata. The port shape
// is this design's choice (a simple stand-in for the device's configuration access port).
//
// The write data of the configuration port and of the redundant store are the erasure
// buffer's read port passed straight through; the controller only steers its address.
//
// Timing: a frame check takes WORDS + latency + 1 cycles. A recovery adds
// (CLUSTER - 1) * (WORDS + latency) + (WORDS + 2) + WORDS + 1 cycles, plus WORDS cycles of
// write-back when it succeeds. Events are one-cycle pulses.
module scrub_ctrl
  import ind_pkg::*;
#(
  parameter int unsigned FRAMES  = NUM_FRAMES,
  parameter int unsigned CLUSTER = CLUSTER_FRAMES,
  parameter int unsigned WORDS   = FRAME_WORDS,
  parameter int unsigned W       = WORD_W,
  parameter int unsigned PW      = parity_width(DIST_V, DIST_H, DIST_D, 1'b1),
  parameter int unsigned NCLUST  = (FRAMES + CLUSTER - 1) / CLUSTER,
  parameter int unsigned FA_W    = $clog2(FRAMES),
  parameter int unsigned CA_W    = (NCLUST > 1) ? $clog2(NCLUST) : 1,
  parameter int unsigned PA_W    = (CLUSTER > 1) ? $clog2(CLUSTER) : 1,
  parameter int unsigned WA_W    = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // commands and status
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
  // configuration memory port
  output logic            cfg_rd,
  output logic            cfg_wr,
  output logic [FA_W-1:0] cfg_frame,
  output logic [WA_W-1:0] cfg_word,
  output logic [W-1:0]    cfg_wdata,
  input  logic            cfg_rvalid,
  input  logic [W-1:0]    cfg_rdata,
  // parity generator
  output logic            pg_clear,
  output logic            pg_valid,
  output logic [WA_W-1:0] pg_row,
  output logic [W-1:0]    pg_word,
  input  logic [PW-1:0]   pg_parity,
  // erasure buffer
  output logic            bf_wr_en,
  output logic            bf_wr_xor,
  output logic [WA_W-1:0] bf_wr_addr,
  output logic [W-1:0]    bf_wr_data,
  output logic [WA_W-1:0] bf_rd_addr,
  input  logic [W-1:0]    bf_rd_data,
  // parity store
  output logic            ps_rd_en,
  output logic [CA_W-1:0] ps_rd_cluster,
  output logic [PA_W-1:0] ps_rd_pos,
  input  logic [PW-1:0]   ps_rd_data,
  input  logic            ps_rd_valid,
  output logic            ps_wr_en,
  output logic [CA_W-1:0] ps_wr_cluster,
  output logic [PA_W-1:0] ps_wr_pos,
  output logic [PW-1:0]   ps_wr_data,
  // redundant store
  output logic            rs_rd_en,
  output logic [CA_W-1:0] rs_rd_cluster,
  output logic [WA_W-1:0] rs_rd_word,
  input  logic [W-1:0]    rs_rd_data,
  input  logic            rs_rd_valid,
  output logic            rs_wr_en,
  output logic [CA_W-1:0] rs_wr_cluster,
  output logic [WA_W-1:0] rs_wr_word,
  output logic [W-1:0]    rs_wr_data
);

  scrub_state_e state;

  logic [FA_W-1:0] frame;      // frame being encoded or scrubbed
  logic [FA_W-1:0] cl_pos;     // position of frame inside its cluster
  logic [CA_W-1:0] cluster;    // cluster of frame
  logic [FA_W-1:0] other;      // surviving frame being read during a recovery
  logic [WA_W:0]   iss;        // next word to request / write
  logic [WA_W:0]   rcv;        // next word to receive
  logic [PW-1:0]   stored_par; // parity of frame read from the parity store

  // Cluster bounds and the next frame of a sweep.
  logic [FA_W:0]   cl_first, cl_last;
  logic            frame_is_cl_last, frame_is_last;
  logic [FA_W-1:0] nxt_frame, nxt_cl_pos;
  logic [CA_W-1:0] nxt_cluster;

  always_comb begin
    cl_first         = (FA_W+1)'(frame) - (FA_W+1)'(cl_pos);
    cl_last          = ((cl_first + (FA_W+1)'(CLUSTER)) > (FA_W+1)'(FRAMES))
                     ? (FA_W+1)'(FRAMES - 1) : (cl_first + (FA_W+1)'(CLUSTER - 1));
    frame_is_last    = (int'(frame) == FRAMES - 1);
    frame_is_cl_last = ((FA_W+1)'(frame) == cl_last);
    if (frame_is_last) begin
      nxt_frame   = '0;
      nxt_cl_pos  = '0;
      nxt_cluster = '0;
    end else if (frame_is_cl_last) begin
      nxt_frame   = frame + 1'b1;
      nxt_cl_pos  = '0;
      nxt_cluster = cluster + 1'b1;
    end else begin
      nxt_frame   = frame + 1'b1;
      nxt_cl_pos  = cl_pos + 1'b1;
      nxt_cluster = cluster;
    end
  end

  // First surviving frame of the cluster at or after a candidate, skipping the erased one.
  function automatic logic [FA_W:0] skip_erased(input logic [FA_W:0] cand,
                                                input logic [FA_W-1:0] erased);
    return (cand == (FA_W+1)'(erased)) ? cand + 1'b1 : cand;
  endfunction

  logic [FA_W:0] first_other, next_other;
  assign first_other = skip_erased(cl_first, frame);
  assign next_other  = skip_erased((FA_W+1)'(other) + 1'b1, frame);

  logic stream_in, stream_last;
  assign stream_in   = ((state == S_REC_RED) ? rs_rd_valid : cfg_rvalid);
  assign stream_last = stream_in && (int'(rcv) == WORDS - 1);

  logic parity_ok;
  assign parity_ok = (pg_parity == stored_par);

  // Datapath control.
  always_comb begin
    cfg_rd        = 1'b0;
    cfg_wr        = 1'b0;
    cfg_frame     = (state == S_REC_READ) ? other : frame;
    cfg_word      = iss[WA_W-1:0];
    cfg_wdata     = bf_rd_data;
    pg_clear      = 1'b0;
    pg_valid      = 1'b0;
    pg_row        = rcv[WA_W-1:0];
    pg_word       = cfg_rdata;
    bf_wr_en      = 1'b0;
    bf_wr_xor     = 1'b1;
    bf_wr_addr    = rcv[WA_W-1:0];
    bf_wr_data    = cfg_rdata;
    bf_rd_addr    = iss[WA_W-1:0];
    ps_rd_en      = 1'b0;
    ps_rd_cluster = cluster;
    ps_rd_pos     = cl_pos[PA_W-1:0];
    ps_wr_en      = 1'b0;
    ps_wr_cluster = cluster;
    ps_wr_pos     = cl_pos[PA_W-1:0];
    ps_wr_data    = pg_parity;
    rs_rd_en      = 1'b0;
    rs_rd_cluster = cluster;
    rs_rd_word    = iss[WA_W-1:0];
    rs_wr_en      = 1'b0;
    rs_wr_cluster = cluster;
    rs_wr_word    = iss[WA_W-1:0];
    rs_wr_data    = bf_rd_data;
    unique case (state)
      S_IDLE: pg_clear = 1'b1;
      S_ENC_READ: begin
        cfg_rd    = int'(iss) < WORDS;
        pg_valid  = cfg_rvalid;
        bf_wr_en  = cfg_rvalid;
        bf_wr_xor = (cl_pos != '0);   // first frame of a cluster loads, the rest XOR
      end
      S_ENC_PAR: begin
        ps_wr_en = 1'b1;
        pg_clear = 1'b1;
      end
      S_ENC_RED: rs_wr_en = 1'b1;
      S_SCR_READ: begin
        cfg_rd   = int'(iss) < WORDS;
        ps_rd_en = (iss == '0);
        pg_valid = cfg_rvalid;
      end
      S_SCR_CHECK: pg_clear = 1'b1;
      S_REC_RED: begin
        rs_rd_en   = int'(iss) < WORDS;
        bf_wr_en   = rs_rd_valid;
        bf_wr_xor  = 1'b0;
        bf_wr_data = rs_rd_data;
      end
      S_REC_READ: begin
        cfg_rd   = int'(iss) < WORDS;
        bf_wr_en = cfg_rvalid;
      end
      S_REC_VERIFY: begin
        pg_valid = 1'b1;
        pg_row   = iss[WA_W-1:0];
        pg_word  = bf_rd_data;
      end
      S_REC_WRITE: cfg_wr = 1'b1;
      S_REC_CHECK: pg_clear = 1'b1;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state               <= S_IDLE;
      frame               <= '0;
      cl_pos              <= '0;
      cluster             <= '0;
      other               <= '0;
      iss                 <= '0;
      rcv                 <= '0;
      stored_par          <= '0;
      encoded             <= 1'b0;
      err_detect          <= 1'b0;
      frame_corrected     <= 1'b0;
      frame_uncorrectable <= 1'b0;
      event_frame         <= '0;
      pass_done           <= 1'b0;
      detected_cnt        <= '0;
      corrected_cnt       <= '0;
      uncorrectable_cnt   <= '0;
      pass_cnt            <= '0;
    end else begin
      err_detect          <= 1'b0;
      frame_corrected     <= 1'b0;
      frame_uncorrectable <= 1'b0;
      pass_done           <= 1'b0;

      // Word streams: requests go out one per cycle, answers are counted as they return.
      if (state inside {S_ENC_READ, S_SCR_READ, S_REC_RED, S_REC_READ}) begin
        if (int'(iss) < WORDS) iss <= iss + 1'b1;
        if (stream_in)         rcv <= rcv + 1'b1;
      end
      if (state == S_SCR_READ && ps_rd_valid) stored_par <= ps_rd_data;

      unique case (state)
        S_IDLE: begin
          iss <= '0;
          rcv <= '0;
          if (encode_start) begin
            frame   <= '0;
            cl_pos  <= '0;
            cluster <= '0;
            encoded <= 1'b0;
            state   <= S_ENC_READ;
          end else if (scrub_en && encoded) begin
            state <= S_SCR_READ;
          end
        end

        S_ENC_READ: if (stream_last) state <= S_ENC_PAR;

        S_ENC_PAR: begin
          iss <= '0;
          rcv <= '0;
          if (frame_is_cl_last) state <= S_ENC_RED;
          else begin
            frame  <= nxt_frame;
            cl_pos <= nxt_cl_pos;
            state  <= S_ENC_READ;
          end
        end

        S_ENC_RED: begin
          iss <= iss + 1'b1;
          if (int'(iss) == WORDS - 1) begin
            iss     <= '0;
            frame   <= nxt_frame;
            cl_pos  <= nxt_cl_pos;
            cluster <= nxt_cluster;
            if (frame_is_last) begin
              encoded <= 1'b1;
              state   <= S_IDLE;
            end else begin
              state <= S_ENC_READ;
            end
          end
        end

        S_SCR_READ: if (stream_last) state <= S_SCR_CHECK;

        S_SCR_CHECK: begin
          iss <= '0;
          rcv <= '0;
          if (!parity_ok) begin
            err_detect   <= 1'b1;
            event_frame  <= frame;
            detected_cnt <= detected_cnt + 1'b1;
            state        <= S_REC_RED;
          end else begin
            frame   <= nxt_frame;
            cl_pos  <= nxt_cl_pos;
            cluster <= nxt_cluster;
            if (frame_is_last) begin
              pass_done <= 1'b1;
              pass_cnt  <= pass_cnt + 1'b1;
            end
            state <= scrub_en ? S_SCR_READ : S_IDLE;
          end
        end

        S_REC_RED: if (stream_last) begin
          iss   <= '0;
          rcv   <= '0;
          other <= first_other[FA_W-1:0];
          state <= (first_other > cl_last) ? S_REC_VERIFY : S_REC_READ;
        end

        S_REC_READ: if (stream_last) begin
          iss   <= '0;
          rcv   <= '0;
          other <= next_other[FA_W-1:0];
          if (next_other > cl_last) state <= S_REC_VERIFY;
        end

        S_REC_VERIFY: begin
          iss <= iss + 1'b1;
          if (int'(iss) == WORDS - 1) begin
            iss   <= '0;
            state <= S_REC_CHECK;
          end
        end

        S_REC_CHECK: begin
          event_frame <= frame;
          if (parity_ok) begin
            state <= S_REC_WRITE;
          end else begin
            frame_uncorrectable <= 1'b1;
            uncorrectable_cnt   <= uncorrectable_cnt + 1'b1;
            frame   <= nxt_frame;
            cl_pos  <= nxt_cl_pos;
            cluster <= nxt_cluster;
            if (frame_is_last) begin
              pass_done <= 1'b1;
              pass_cnt  <= pass_cnt + 1'b1;
            end
            state <= scrub_en ? S_SCR_READ : S_IDLE;
          end
        end

        S_REC_WRITE: begin
          iss <= iss + 1'b1;
          if (int'(iss) == WORDS - 1) begin
            iss             <= '0;
            frame_corrected <= 1'b1;
            corrected_cnt   <= corrected_cnt + 1'b1;
            frame   <= nxt_frame;
            cl_pos  <= nxt_cl_pos;
            cluster <= nxt_cluster;
            if (frame_is_last) begin
              pass_done <= 1'b1;
              pass_cnt  <= pass_cnt + 1'b1;
            end
            state <= scrub_en ? S_SCR_READ : S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // The configuration port never sees a read and a write in the same cycle (both are
  // decoded from the state, which reset forces to idle, so no reset gating is needed).
  a_cfg_rw_exclusive: assert property (@(posedge clk) !(cfg_rd && cfg_wr))
    else $error("scrub_ctrl: read and write together");

endmodule
