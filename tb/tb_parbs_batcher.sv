// tb_parbs_batcher: a new batch may start only when no marked request is
// left and some bank holds requests; the threads of the new batch are then
// ranked by their largest per-bank load (lighter is better), ties by total
// load and thread number.
module tb_parbs_batcher;
  localparam int NB = 3, NT = 4;
  logic clk = 0, rst_n = 0;
  logic [4:0] marked_cnt [NB][NT];
  logic [NB-1:0] bank_busy = '0;
  logic new_batch;
  logic [1:0] thread_rank [NT];
  logic [15:0] batch_count;
  int checks = 0, failures = 0;

  parbs_batcher #(.NB(NB), .NT(NT), .CW(5)) dut (.clk, .rst_n, .marked_cnt, .bank_busy,
                                                 .new_batch, .thread_rank, .batch_count);
  always #5 clk = ~clk;

  task automatic expect_nb(input logic e, input string what);
    #1 checks++;
    if (new_batch !== e) begin failures++; $display("FAIL %s: new_batch=%b", what, new_batch); end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) for (int t = 0; t < NT; t++) marked_cnt[b][t] = '0;
    @(posedge clk); #1 rst_n = 1;
    expect_nb(0, "empty banks");
    bank_busy = 3'b010;
    expect_nb(1, "requests, nothing marked");
    @(posedge clk); #1;
    // marks appear: loads per thread (max over banks): t0=2, t1=1, t2=3, t3=1 (t3 total 2)
    marked_cnt[0][0] = 2; marked_cnt[1][0] = 1;
    marked_cnt[1][1] = 1;
    marked_cnt[2][2] = 3;
    marked_cnt[0][3] = 1; marked_cnt[2][3] = 1;
    expect_nb(0, "batch in progress");
    @(posedge clk); #1;
    // expected rank (3 = best): t1 (max 1, total 1) > t3 (max 1, total 2) > t0 > t2
    checks++;
    if (thread_rank[1] != 3 || thread_rank[3] != 2 || thread_rank[0] != 1 || thread_rank[2] != 0) begin
      failures++;
      $display("FAIL ranks %0d %0d %0d %0d", thread_rank[0], thread_rank[1], thread_rank[2], thread_rank[3]);
    end
    marked_cnt[2][2] = 0; marked_cnt[0][0] = 0;
    expect_nb(0, "some marks left");
    for (int b = 0; b < NB; b++) for (int t = 0; t < NT; t++) marked_cnt[b][t] = '0;
    expect_nb(1, "all marked requests issued");
    @(posedge clk); #1;
    checks++;
    if (batch_count != 2) begin failures++; $display("FAIL batch count %0d", batch_count); end
    // equal loads: lower thread number wins
    marked_cnt[0][0] = 1; marked_cnt[0][1] = 1; marked_cnt[0][2] = 1; marked_cnt[0][3] = 1;
    @(posedge clk); #1;
    checks++;
    if (thread_rank[0] != 3 || thread_rank[1] != 2 || thread_rank[2] != 1 || thread_rank[3] != 0) begin
      failures++; $display("FAIL tie ranks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
