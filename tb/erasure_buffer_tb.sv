// erasure_buffer_tb: checks the one-frame XOR accumulator. It encodes random clusters
// (load the first frame, XOR in the rest) against a reference XOR, then erases each
// frame in turn and checks that loading the redundant block and XORing in the other
// frames rebuilds the erased frame exactly.
module erasure_buffer_tb;
  localparam int unsigned WORDS = 81, W = 32, NF = 6;

  logic clk = 1'b0;
  logic wr_en = 1'b0, wr_xor = 1'b0;
  logic [6:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  erasure_buffer #(.WORDS(WORDS), .W(W)) u_dut (
    .clk, .wr_en, .wr_xor, .wr_addr, .wr_data, .rd_addr, .rd_data);

  logic [W-1:0] frames [NF][WORDS];
  logic [W-1:0] red [WORDS];

  task automatic put(input int a, input logic [W-1:0] d, input logic x);
    @(negedge clk) begin wr_en = 1'b1; wr_xor = x; wr_addr = 7'(a); wr_data = d; end
    @(negedge clk) wr_en = 1'b0;
  endtask

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int trial = 0; trial < 3; trial++) begin
      foreach (frames[f, w]) frames[f][w] = $urandom();
      // Encode: reference redundant block.
      foreach (red[w]) begin
        red[w] = '0;
        for (int f = 0; f < int'(NF); f++) red[w] ^= frames[f][w];
      end
      for (int f = 0; f < int'(NF); f++)
        for (int w = 0; w < int'(WORDS); w++) put(w, frames[f][w], f != 0);
      for (int w = 0; w < int'(WORDS); w++) begin
        rd_addr = 7'(w); #1;
        check("encoded redundant word", rd_data == red[w]);
      end
      // Decode every possible erasure.
      for (int e = 0; e < int'(NF); e++) begin
        for (int w = 0; w < int'(WORDS); w++) put(w, red[w], 1'b0);
        for (int f = 0; f < int'(NF); f++)
          if (f != e) for (int w = 0; w < int'(WORDS); w++) put(w, frames[f][w], 1'b1);
        for (int w = 0; w < int'(WORDS); w++) begin
          rd_addr = 7'(w); #1;
          check("rebuilt erased word", rd_data == frames[e][w]);
        end
      end
    end
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
