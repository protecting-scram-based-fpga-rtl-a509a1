// ind_parity_gen: interleaved multi-dimensional (I2D / I3D) parity of one frame.
//
// The frame is a grid: row r is frame word r, column c is bit c of that word.
// Parity bits are shared between cells that lie a fixed distance apart:
//   vertical   bit  c mod V            (column groups, interleaving distance V)
//   horizontal bit  r mod H            (row groups, interleaving distance H)
//   diagonal   bit  (r + c) mod D      (diagonal groups, interleaving distance D; I3D only)
// Each parity bit is the XOR of all cells of its group. The mapping of cells to groups
// follows the worked examples (vertical 4, horizontal 3, diagonal 5), where the diagonal
// group label of row r, column c is ((r + c) mod 5) + 1. With USE_DIAG = 0 the block is
// the two-dimensional I2D variant.
//
// Interface and timing: words arrive one per cycle at most (in_valid, in_row, in_word),
// in any order. clear zeroes the accumulators (it wins over a word in the same cycle).
// parity is registered: it includes a word from the cycle after that word is accepted.
// Which row holds which frame word, and that words stream one per clock, are choices
// of this design.
module ind_parity_gen
  import ind_pkg::*;
#(
  parameter int unsigned WORDS    = FRAME_WORDS,
  parameter int unsigned W        = WORD_W,
  parameter int unsigned V        = DIST_V,
  parameter int unsigned H        = DIST_H,
  parameter int unsigned D        = DIST_D,
  parameter bit          USE_DIAG = 1'b1,
  parameter int unsigned PW       = parity_width(V, H, D, USE_DIAG),
  parameter int unsigned ROW_W    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [ROW_W-1:0] in_row,
  input  logic [W-1:0]     in_word,
  output logic [PW-1:0]    parity
);

  logic [PW-1:0] contrib;

  // Parity contribution of one word: every set bit toggles its three group bits.
  // The row residues are computed once per word; per column only a constant offset
  // (c mod V, c mod D) is added, with a single wrap-around for the diagonal.
  logic [$clog2(H+1)-1:0] hrow;
  logic [$clog2(D+1)-1:0] drow;
  assign hrow = ($clog2(H+1))'(in_row % ROW_W'(H));
  assign drow = ($clog2(D+1))'(in_row % ROW_W'(D));

  always_comb begin
    int unsigned didx;
    contrib = '0;
    for (int unsigned c = 0; c < W; c++) begin
      didx = int'(drow) + (c % D);
      if (didx >= D) didx = didx - D;
      contrib[c % V]    ^= in_word[c];
      contrib[V + int'(hrow)] ^= in_word[c];
      if (USE_DIAG) contrib[V + H + didx] ^= in_word[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        parity <= '0;
    else if (clear)    parity <= '0;
    else if (in_valid) parity <= parity ^ contrib;
  end

  initial begin
    assert (PW == parity_width(V, H, D, USE_DIAG))
      else $error("ind_parity_gen: PW must equal V + H (+ D)");
    assert (V > 0 && H > 0 && (!USE_DIAG || D > 0))
      else $error("ind_parity_gen: interleaving distances must be positive");
  end

endmodule
