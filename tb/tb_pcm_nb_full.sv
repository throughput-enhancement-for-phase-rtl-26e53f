// tb_pcm_nb_full: end-to-end test of the rank controller at its full size and
// timing, every parameter at its default: 8 banks, 2048 wordlines per array,
// 16-entry bank queues, 50 ns / 10 ns reads, 200 ns + 100 ns per round writes,
// a budget of 1024 concurrent bit writes, RAWP. 600 random requests; see
// pcm_top_env for what is checked. Waiting for power budget is not required
// here: 16 write slots whose demand is capped at 64 cannot exceed 1024.
module tb_pcm_nb_full;
  import pcm_pkg::*;
  localparam int NB = NUM_BANKS, ROWS = ROWS_PER_ARRAY;
  logic clk, rst_n, req_valid, req_ready, resp_valid, pw_rd_en, budget_stall;
  pcm_req_t req;
  pcm_resp_t resp;
  logic [1:0] arr_rd_en [NB], arr_wr_en [NB];
  pcm_addr_t arr_rd_addr [NB][2], arr_wr_addr [NB][2], pw_rd_addr;
  cell_word_t arr_rd_data [NB][2], arr_wr_data [NB][2], pw_rd_data;
  logic [63:0] en_o [NB];
  logic [ROWS-1:0] lwl_o [NB][64];
  bank_ev_t ev_o [NB];
  logic [DEM_W-1:0] budget_avail;
  logic [15:0] batch_count;

  pcm_nb_top dut (.*);
  pcm_top_env #(.NB(NB), .ROWS(ROWS), .NREQ(600), .MAXCYC(60000), .REQUIRE(16'hdfff)) env (.*);
endmodule
