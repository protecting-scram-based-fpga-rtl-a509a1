// redundant_store: block RAM holding the redundant erasure block of every cluster.
//
// Each cluster has one redundant block of WORDS words. Words are interleaved by
// cluster: word w of cluster k sits at address w * NCLUST + k, so an upset spanning
// neighbouring words damages the blocks of different clusters, never two words of the
// same cluster's block and at most one block per cluster. The document asks for the
// redundant data to be interleaved; this address map is this design's choice.
//
// Interface and timing: a synchronous single-port RAM. rd_en with rd_cluster and
// rd_word returns the word on rd_data one cycle later, flagged by rd_valid. wr_en writes
// wr_data; a write has priority over a read in the same cycle.
module redundant_store
  import ind_pkg::*;
#(
  parameter int unsigned NCLUST = (NUM_FRAMES + CLUSTER_FRAMES - 1) / CLUSTER_FRAMES,
  parameter int unsigned WORDS  = FRAME_WORDS,
  parameter int unsigned W      = WORD_W,
  parameter int unsigned CA_W   = (NCLUST > 1) ? $clog2(NCLUST) : 1,
  parameter int unsigned WA_W   = $clog2(WORDS),
  parameter int unsigned DEPTH  = NCLUST * WORDS,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rd_en,
  input  logic [CA_W-1:0] rd_cluster,
  input  logic [WA_W-1:0] rd_word,
  output logic [W-1:0]    rd_data,
  output logic            rd_valid,
  input  logic            wr_en,
  input  logic [CA_W-1:0] wr_cluster,
  input  logic [WA_W-1:0] wr_word,
  input  logic [W-1:0]    wr_data
);

  logic [W-1:0] mem [DEPTH];

  function automatic logic [ADDR_W-1:0] addr_of(input logic [CA_W-1:0] cluster,
                                                input logic [WA_W-1:0] word);
    return ADDR_W'(int'(word) * NCLUST + int'(cluster));
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en)      mem[addr_of(wr_cluster, wr_word)] <= wr_data;
    else if (rd_en) rd_data <= mem[addr_of(rd_cluster, rd_word)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en && !wr_en;
  end

  always_ff @(posedge clk) begin
    if (wr_en) assert (int'(wr_cluster) < NCLUST && int'(wr_word) < WORDS)
      else $error("redundant_store: address out of range");
    if (rd_en) assert (int'(rd_cluster) < NCLUST && int'(rd_word) < WORDS)
      else $error("redundant_store: address out of range");
  end

endmodule
