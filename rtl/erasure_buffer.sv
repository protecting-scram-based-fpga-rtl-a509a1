// erasure_buffer: one-frame XOR accumulator for the single-redundant-block erasure code.
//
// The erasure code keeps one redundant block per cluster of frames: the bitwise XOR of
// all frames of the cluster. Any one erased frame is then the XOR of the redundant block
// and the surviving frames. This buffer holds one frame (WORDS words of W bits) and does
// both directions of that code: encoding loads the first frame of a cluster and XORs in
// the rest; decoding loads the redundant block and XORs in every surviving frame, which
// leaves the erased frame in the buffer. XOR as the erasure code is this design's choice;
// the document asks only for an optimal code with one redundant block and a short decode.
//
// Interface and timing: one write per cycle. wr_en with wr_xor = 0 stores wr_data at
// word wr_addr; with wr_xor = 1 it stores wr_data XOR the word already there. The read
// port is combinational (rd_addr -> rd_data), as in a distributed RAM.
module erasure_buffer
  import ind_pkg::*;
#(
  parameter int unsigned WORDS  = FRAME_WORDS,
  parameter int unsigned W      = WORD_W,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic              wr_xor,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [W-1:0]      wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [W-1:0]      rd_data
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_xor ? (mem[wr_addr] ^ wr_data) : wr_data;
  end

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en) assert (int'(wr_addr) < WORDS) else $error("erasure_buffer: write address out of range");
  end

endmodule
