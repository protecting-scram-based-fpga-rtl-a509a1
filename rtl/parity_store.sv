// parity_store: block RAM holding the InD parity bits of every configuration frame.
//
// One PW-bit entry per frame. To keep a multiple-bit upset in this memory from hitting
// the parity of two frames of the same cluster, entries are interleaved by cluster:
// frame f, the i-th frame (i = f mod CLUSTER) of cluster k (k = f / CLUSTER), sits at
// address i * NCLUST + k, so neighbouring entries always belong to different clusters.
// The document asks for such interleaving; this address map is this design's choice.
//
// Interface and timing: a synchronous single-port RAM. A frame is named by its cluster
// and its position in the cluster (the controller keeps both as counters, so no divider
// is needed). rd_en returns the entry on rd_data one cycle later, flagged by rd_valid.
// wr_en writes an entry; a write has priority over a read in the same cycle.
module parity_store
  import ind_pkg::*;
#(
  parameter int unsigned FRAMES  = NUM_FRAMES,
  parameter int unsigned CLUSTER = CLUSTER_FRAMES,
  parameter int unsigned PW      = parity_width(DIST_V, DIST_H, DIST_D, 1'b1),
  parameter int unsigned NCLUST  = (FRAMES + CLUSTER - 1) / CLUSTER,
  parameter int unsigned CA_W    = (NCLUST > 1) ? $clog2(NCLUST) : 1,
  parameter int unsigned PA_W    = (CLUSTER > 1) ? $clog2(CLUSTER) : 1,
  parameter int unsigned DEPTH   = CLUSTER * NCLUST,
  parameter int unsigned ADDR_W  = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rd_en,
  input  logic [CA_W-1:0] rd_cluster,
  input  logic [PA_W-1:0] rd_pos,
  output logic [PW-1:0]   rd_data,
  output logic            rd_valid,
  input  logic            wr_en,
  input  logic [CA_W-1:0] wr_cluster,
  input  logic [PA_W-1:0] wr_pos,
  input  logic [PW-1:0]   wr_data
);

  logic [PW-1:0] mem [DEPTH];

  function automatic logic [ADDR_W-1:0] addr_of(input logic [CA_W-1:0] cluster,
                                                input logic [PA_W-1:0] pos);
    return ADDR_W'(int'(pos) * NCLUST + int'(cluster));
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en)      mem[addr_of(wr_cluster, wr_pos)] <= wr_data;
    else if (rd_en) rd_data <= mem[addr_of(rd_cluster, rd_pos)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en && !wr_en;
  end

  always_ff @(posedge clk) begin
    if (wr_en) assert (int'(wr_cluster) * CLUSTER + int'(wr_pos) < FRAMES && int'(wr_pos) < CLUSTER)
      else $error("parity_store: frame out of range");
    if (rd_en) assert (int'(rd_cluster) * CLUSTER + int'(rd_pos) < FRAMES && int'(rd_pos) < CLUSTER)
      else $error("parity_store: frame out of range");
  end

endmodule
