// config_mem_model: behavioural model of an FPGA's configuration memory and its access
// port, for simulation only (not synthesizable as a device part).
//
// FRAMES frames of WORDS words of W bits, stored as one flat array, word w of frame f at
// index f * WORDS + w. Every word starts at a fixed pseudo-random value, golden(index),
// so a testbench can tell at any time whether the memory holds its original contents.
// Port: one access per cycle; a read (rd, frame, word) returns rvalid/rdata LATENCY
// cycles later, in order; a write (wr) takes effect at the clock edge. Testbenches flip
// bits directly in mem[] to model upsets.
module config_mem_model #(
  parameter int unsigned FRAMES  = 64,
  parameter int unsigned WORDS   = 81,
  parameter int unsigned W       = 32,
  parameter int unsigned LATENCY = 1,
  parameter int unsigned FA_W    = $clog2(FRAMES),
  parameter int unsigned WA_W    = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            rd,
  input  logic            wr,
  input  logic [FA_W-1:0] frame,
  input  logic [WA_W-1:0] word,
  input  logic [W-1:0]    wdata,
  output logic            rvalid,
  output logic [W-1:0]    rdata
);

  logic [W-1:0] mem [FRAMES*WORDS];

  function automatic logic [W-1:0] golden(input int unsigned idx);
    logic [63:0] x;
    x = 64'(idx) * 64'h9E37_79B9_7F4A_7C15 + 64'h1234_5678;
    x = x ^ (x >> 29);
    x = x * 64'hBF58_476D_1CE4_E5B9;
    x = x ^ (x >> 32);
    return x[W-1:0];
  endfunction

  initial begin
    for (int unsigned i = 0; i < FRAMES * WORDS; i++) mem[i] = golden(i);
  end

  logic         pipe_v [LATENCY];
  logic [W-1:0] pipe_d [LATENCY];

  initial begin
    for (int i = 0; i < int'(LATENCY); i++) begin
      pipe_v[i] = 1'b0;
      pipe_d[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[int'(frame) * WORDS + int'(word)] <= wdata;
    pipe_v[0] <= rd;
    pipe_d[0] <= mem[int'(frame) * WORDS + int'(word)];
    for (int i = 1; i < int'(LATENCY); i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
  end

  assign rvalid = pipe_v[LATENCY-1];
  assign rdata  = pipe_d[LATENCY-1];

endmodule
