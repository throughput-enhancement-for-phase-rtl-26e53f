// parbs_batcher: batch formation and thread ranking of PAR-BS/Half.
//
// Parallelism-aware batch scheduling groups the requests of all bank queues
// into batches: a new batch is formed only after every marked request of the
// previous batch has been issued, which bounds how long any request can be
// overtaken. In the half-bank variant each bank marks, at the new_batch
// pulse, up to MARK_CAP/2 of the oldest requests per thread and per half bank
// (done inside nb_bank). This block watches the per-bank, per-thread counts
// of marked requests, raises new_batch when none is left and some bank holds
// requests, and one cycle later ranks the threads of the fresh batch:
// a thread whose largest per-bank load is smaller is ranked higher (ties: the
// smaller total load, then the lower thread number). Rank NUM_THREADS-1 is
// the best. The batching rule and the half-bank marking are the document's;
// the ranking rule is PAR-BS's shortest-job-first rule as this design reads
// it.
module parbs_batcher
  import pcm_pkg::*;
#(
  parameter int NB = NUM_BANKS,
  parameter int NT = NUM_THREADS,
  parameter int CW = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CW-1:0]         marked_cnt [NB][NT],
  input  logic [NB-1:0]         bank_busy,     // bank queue not empty
  output logic                  new_batch,
  output logic [$clog2(NT)-1:0] thread_rank [NT],
  output logic [15:0]           batch_count
);
  logic any_marked, rank_now;
  logic [CW-1:0]   load  [NT];
  logic [CW+3:0]   total [NT];
  logic [$clog2(NT)-1:0] rank_c [NT];

  always_comb begin
    any_marked = 1'b0;
    for (int t = 0; t < NT; t++) begin
      load[t] = '0; total[t] = '0;
      for (int b = 0; b < NB; b++) begin
        if (marked_cnt[b][t] != 0) any_marked = 1'b1;
        if (marked_cnt[b][t] > load[t]) load[t] = marked_cnt[b][t];
        total[t] = total[t] + (CW+4)'(marked_cnt[b][t]);
      end
    end
    for (int t = 0; t < NT; t++) begin
      rank_c[t] = '0;
      for (int u = 0; u < NT; u++)
        if (u != t && (load[u] > load[t] ||
                       (load[u] == load[t] && total[u] > total[t]) ||
                       (load[u] == load[t] && total[u] == total[t] && u > t)))
          rank_c[t] = rank_c[t] + 1'b1;
    end
    new_batch = !any_marked && (|bank_busy) && !rank_now;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rank_now <= 1'b0; batch_count <= '0;
      for (int t = 0; t < NT; t++) thread_rank[t] <= '0;
    end else begin
      rank_now <= new_batch;
      if (new_batch) batch_count <= batch_count + 1'b1;
      if (rank_now) thread_rank <= rank_c;
    end
endmodule
