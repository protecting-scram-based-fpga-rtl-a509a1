// parity_store_tb: writes a random parity entry for every frame, reads all of them back
// (frame f = position f mod CLUSTER of cluster f / CLUSTER) and checks the one-cycle
// read latency, the cluster-interleaved placement (neighbouring
// RAM entries belong to different clusters, frame i of cluster k at i * NCLUST + k),
// including a last cluster that is only partly filled.
module parity_store_tb;
  localparam int unsigned FRAMES = 22, CLUSTER = 4, PW = 12;
  localparam int unsigned NCLUST = (FRAMES + CLUSTER - 1) / CLUSTER;

  logic clk = 1'b0, rst_n = 1'b1;
  logic rd_en = 1'b0, wr_en = 1'b0, rd_valid;
  logic [2:0] rd_cluster = '0, wr_cluster = '0;
  logic [1:0] rd_pos = '0, wr_pos = '0;
  logic [PW-1:0] rd_data, wr_data = '0;
  logic [PW-1:0] expect_par [FRAMES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts at once

  parity_store #(.FRAMES(FRAMES), .CLUSTER(CLUSTER), .PW(PW)) u_dut (
    .clk, .rst_n, .rd_en, .rd_cluster, .rd_pos, .rd_data, .rd_valid,
    .wr_en, .wr_cluster, .wr_pos, .wr_data);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < int'(FRAMES); f++) begin
      expect_par[f] = PW'($urandom());
      @(negedge clk) begin wr_en = 1'b1; wr_cluster = 3'(f / CLUSTER); wr_pos = 2'(f % CLUSTER);
        wr_data = expect_par[f];
      end
    end
    @(negedge clk) wr_en = 1'b0;
    for (int f = FRAMES - 1; f >= 0; f--) begin
      @(negedge clk) begin rd_en = 1'b1; rd_cluster = 3'(f / CLUSTER); rd_pos = 2'(f % CLUSTER); end
      @(negedge clk) rd_en = 1'b0;
      check("rd_valid one cycle after rd_en", rd_valid);
      check("read back", rd_data == expect_par[f]);
      check("interleaved placement",
            u_dut.mem[(f % CLUSTER) * NCLUST + (f / CLUSTER)] == expect_par[f]);
    end
    @(negedge clk);
    check("rd_valid idle", !rd_valid);
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
