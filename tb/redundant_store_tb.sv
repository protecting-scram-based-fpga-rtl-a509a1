// redundant_store_tb: writes a random erasure block for every cluster, reads them back
// and checks the one-cycle read latency and the interleaved placement (word w of
// cluster k at w * NCLUST + k, so neighbouring RAM words belong to different clusters).
module redundant_store_tb;
  localparam int unsigned NCLUST = 5, WORDS = 81, W = 32;

  logic clk = 1'b0, rst_n = 1'b1;
  logic rd_en = 1'b0, wr_en = 1'b0, rd_valid;
  logic [2:0] rd_cluster = '0, wr_cluster = '0;
  logic [6:0] rd_word = '0, wr_word = '0;
  logic [W-1:0] rd_data, wr_data = '0;
  logic [W-1:0] blocks [NCLUST][WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts at once

  redundant_store #(.NCLUST(NCLUST), .WORDS(WORDS), .W(W)) u_dut (
    .clk, .rst_n, .rd_en, .rd_cluster, .rd_word, .rd_data, .rd_valid,
    .wr_en, .wr_cluster, .wr_word, .wr_data);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NCLUST); k++)
      for (int w = 0; w < int'(WORDS); w++) begin
        blocks[k][w] = $urandom();
        @(negedge clk) begin
          wr_en = 1'b1; wr_cluster = 3'(k); wr_word = 7'(w); wr_data = blocks[k][w];
        end
      end
    @(negedge clk) wr_en = 1'b0;
    for (int k = NCLUST - 1; k >= 0; k--)
      for (int w = 0; w < int'(WORDS); w += 7) begin
        @(negedge clk) begin rd_en = 1'b1; rd_cluster = 3'(k); rd_word = 7'(w); end
        @(negedge clk) rd_en = 1'b0;
        check("rd_valid one cycle after rd_en", rd_valid);
        check("read back", rd_data == blocks[k][w]);
        check("interleaved placement", u_dut.mem[w * NCLUST + k] == blocks[k][w]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
