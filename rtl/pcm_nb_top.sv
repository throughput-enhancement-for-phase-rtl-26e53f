// pcm_nb_top: memory-side controller for one PCM rank with non-blocking banks.
//
// PCM writes take about twenty times as long as reads and need much power, so
// a rank of conventional banks delivers little throughput. This design raises
// it in three ways that build on each other:
//   - every bank is non-blocking: its two halves each run one read and one
//     write at a time, in different array columns, using wordline and
//     V-line holding circuits so the shared decoders can be released
//     (nb_bank, bank_wl_ctrl);
//   - the requests in each bank queue are reordered to fill those slots,
//     writes first but keeping row-buffer hits (RAWP, rawp_select), inside
//     the batches of a PAR-BS scheduler that balances the two halves
//     (parbs_batcher);
//   - writes are admitted against a power budget of concurrent cell writes,
//     counting only the cells that really change and choosing per write how
//     many rounds to split it into (power_budget_mgr).
// Requests enter one per cycle (valid/ready) and go to the queue of the bank
// named in their address, in arrival order. Read data leave one per cycle
// through a round-robin arbiter over the 2*NB read slots; writes complete
// silently. The cell arrays themselves (cells, sense amplifiers, write
// drivers) are outside: this block drives their local wordlines and exchanges
// line data with them through per-half read/write ports, plus one port for
// the pre-write read that power budgeting needs.
// Composition follows the document; the request and response ports, the
// dispatch order and the response arbitration are this design's.
module pcm_nb_top
  import pcm_pkg::*;
#(
  parameter int     NB       = NUM_BANKS,
  parameter int     Q        = 16,
  parameter sched_e SCHED    = SCHED_RAWP,
  parameter int     ROWS     = ROWS_PER_ARRAY,
  parameter int     MARK_CAP = 4,
  parameter int     BUDGET   = POWER_BUDGET,
  parameter int     DCAP     = DEMAND_CAP,
  parameter bit     FNW      = 1'b1,
  parameter int     T_MISS   = T_RD_MISS,
  parameter int     T_HIT    = T_RD_HIT,
  parameter int     T_SET    = T_WR_SETUP,
  parameter int     T_RND    = T_ROUND,
  parameter int     T_PEN    = T_BPB,
  parameter int     FILL     = FILL_READS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  input  pcm_req_t             req,
  output logic                 req_ready,
  output logic                 resp_valid,
  output pcm_resp_t            resp,
  // cell arrays: data side
  output logic [1:0]           arr_rd_en   [NB],
  output pcm_addr_t            arr_rd_addr [NB][2],
  input  cell_word_t           arr_rd_data [NB][2],
  output logic [1:0]           arr_wr_en   [NB],
  output pcm_addr_t            arr_wr_addr [NB][2],
  output cell_word_t           arr_wr_data [NB][2],
  output logic                 pw_rd_en,
  output pcm_addr_t            pw_rd_addr,
  input  cell_word_t           pw_rd_data,
  // cell arrays: wordline side
  output logic [63:0]          en_o  [NB],
  output logic [ROWS-1:0]      lwl_o [NB][64],
  // status and events
  output bank_ev_t             ev_o [NB],
  output logic                 budget_stall,
  output logic [DEM_W-1:0]     budget_avail,
  output logic [15:0]          batch_count
);
  localparam int NT = NUM_THREADS;
  localparam int NR = 2 * NB;
  localparam int RI = $clog2(NR);

  logic [NB-1:0]         b_in_valid, b_in_ready, b_busy;
  logic                  new_batch;
  logic [$clog2(NT)-1:0] thread_rank [NT];
  logic [4:0]            marked_cnt [NB][NT];

  logic [NR-1:0]         p_req, p_ack, p_grant, p_done;
  pcm_addr_t             p_addr [NR];
  logic [LINE_BITS-1:0]  p_data [NR];
  wr_cfg_t               g_cfg;
  cell_word_t            g_word;

  logic [NR-1:0]         r_valid, r_ack;
  pcm_resp_t             r_resp [NR];
  logic [RI-1:0]         r_rr;

  assign req_ready = b_in_ready[req.addr.bank];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [1:0]           bq, bdone, back, bgrant, rv, rack;
    pcm_addr_t            baddr [2];
    logic [LINE_BITS-1:0] bdata [2];
    pcm_resp_t            rr [2];
    logic [7:0]           h_unused, v_unused;

    assign b_in_valid[b] = req_valid && req.addr.bank == BANK_W'(b);
    assign back   = p_ack[2*b +: 2];
    assign bgrant = p_grant[2*b +: 2];
    assign rack   = r_ack[2*b +: 2];
    for (genvar h = 0; h < 2; h++) begin : g_h
      assign p_req[2*b+h]   = bq[h];
      assign p_done[2*b+h]  = bdone[h];
      assign p_addr[2*b+h]  = baddr[h];
      assign p_data[2*b+h]  = bdata[h];
      assign r_valid[2*b+h] = rv[h];
      assign r_resp[2*b+h]  = rr[h];
    end

    nb_bank #(.Q(Q), .SCHED(SCHED), .ROWS(ROWS), .MARK_CAP(MARK_CAP), .NT(NT),
              .T_MISS(T_MISS), .T_HIT(T_HIT), .T_SET(T_SET), .T_RND(T_RND),
              .FILL(FILL)) u_bank (
      .clk, .rst_n,
      .in_valid(b_in_valid[b]), .in_req(req), .in_ready(b_in_ready[b]),
      .new_batch(new_batch), .thread_rank(thread_rank), .marked_cnt(marked_cnt[b]),
      .busy(b_busy[b]),
      .bpb_req(bq), .bpb_addr(baddr), .bpb_data(bdata), .bpb_ack(back),
      .bpb_grant(bgrant), .grant_cfg(g_cfg), .grant_word(g_word), .wr_done(bdone),
      .arr_rd_en(arr_rd_en[b]), .arr_rd_addr(arr_rd_addr[b]), .arr_rd_data(arr_rd_data[b]),
      .arr_wr_en(arr_wr_en[b]), .arr_wr_addr(arr_wr_addr[b]), .arr_wr_data(arr_wr_data[b]),
      .resp_valid(rv), .resp(rr), .resp_ack(rack),
      .h_o(h_unused), .v_o(v_unused), .en_o(en_o[b]), .lwl_o(lwl_o[b]), .ev(ev_o[b]));
  end

  parbs_batcher #(.NB(NB), .NT(NT), .CW(5)) u_batch (
    .clk, .rst_n, .marked_cnt(marked_cnt), .bank_busy(b_busy), .new_batch(new_batch),
    .thread_rank(thread_rank), .batch_count(batch_count));

  power_budget_mgr #(.NREQ(NR), .BUDGET(BUDGET), .DCAP(DCAP), .FNW(FNW), .T_PEN(T_PEN),
                     .T_SET(T_SET), .T_RND(T_RND)) u_pwr (
    .clk, .rst_n, .req_valid(p_req), .req_addr(p_addr), .req_data(p_data), .req_ack(p_ack),
    .pw_rd_en(pw_rd_en), .pw_rd_addr(pw_rd_addr), .pw_rd_data(pw_rd_data),
    .grant(p_grant), .grant_cfg(g_cfg), .grant_word(g_word), .done(p_done),
    .avail(budget_avail), .ev_budget_stall(budget_stall));

  // Read responses: one per cycle, round robin over the read slots.
  always_comb begin
    logic          found;
    logic [RI-1:0] pick;
    found = 1'b0; pick = '0;
    for (int n = NR-1; n >= 0; n--) begin
      logic [RI-1:0] i;
      i = RI'((32'(r_rr) + n) % NR);
      if (r_valid[i]) begin found = 1'b1; pick = i; end
    end
    r_ack = '0;
    if (found) r_ack[pick] = 1'b1;
    resp_valid = found;
    resp       = r_resp[pick];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r_rr <= '0;
    else begin
      for (int i = 0; i < NR; i++)
        if (r_ack[i]) r_rr <= RI'((i + 1) % NR);
    end
endmodule
