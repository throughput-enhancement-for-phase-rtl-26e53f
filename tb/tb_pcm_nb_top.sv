// tb_pcm_nb_top: end-to-end test of the rank controller at reduced size and
// timing (16 wordlines per array, 8-entry bank queues, short read and write
// times, a power budget of 128 bit writes so that writes wait for budget),
// RAWP scheduling. 3000 random requests; see pcm_top_env for what is checked.
module tb_pcm_nb_top;
  import pcm_pkg::*;
  localparam int NB = NUM_BANKS, ROWS = 16;
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

  pcm_nb_top #(.NB(NB), .Q(8), .SCHED(SCHED_RAWP), .ROWS(ROWS), .BUDGET(128), .T_MISS(6),
               .T_HIT(2), .T_SET(8), .T_RND(4), .T_PEN(4)) dut (.*);
  pcm_top_env #(.NB(NB), .ROWS(ROWS), .NREQ(3000), .MAXCYC(100000)) env (.*);
endmodule
