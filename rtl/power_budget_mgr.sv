// power_budget_mgr: bit-level power budgeting (BPB) for all write slots of
// the rank.
//
// The power budget is the number of cells that may be written at the same
// time (charge-pump limit). Every write slot of every half bank (NREQ of
// them) asks this block for permission before it starts a write.
// Per request:
//   1. one request per cycle is accepted, round robin; the old content of the
//      line is read from the cells (pre-write read, one cycle);
//   2. dw_fnw_encoder counts the cells each 64-bit segment will change and
//      bpb_config_select picks the write configuration (8/4/2/1 rounds) with
//      the earliest possible finish; the request becomes pending;
//   3. after the configuration penalty T_PEN a pending write is admitted as
//      soon as its demand fits into the free budget; several pending writes
//      are tried each cycle in round-robin order so that a small write can
//      overtake a large one that does not fit; one admission per cycle;
//   4. on admission the slot gets a one-cycle grant with the configuration,
//      the encoded cell word and the number of rounds to perform; the
//      demand is held until the slot reports the write done.
// For the estimate every running write counts down the cycles left to its
// projected finish (never below 1 while it still runs).
// Steps, the penalty and the estimate are the document's; the arbitration and
// the place of the pre-write read are this design's.
module power_budget_mgr
  import pcm_pkg::*;
#(
  parameter int NREQ   = 2 * NUM_BANKS,
  parameter int BUDGET = POWER_BUDGET,
  parameter int DCAP   = DEMAND_CAP,
  parameter bit FNW    = 1'b1,
  parameter int T_PEN  = T_BPB,
  parameter int T_SET  = T_WR_SETUP,
  parameter int T_RND  = T_ROUND
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NREQ-1:0]      req_valid,
  input  pcm_addr_t            req_addr [NREQ],
  input  logic [LINE_BITS-1:0] req_data [NREQ],
  output logic [NREQ-1:0]      req_ack,
  output logic                 pw_rd_en,     // pre-write read of the old line
  output pcm_addr_t            pw_rd_addr,
  input  cell_word_t           pw_rd_data,   // valid the cycle after pw_rd_en
  output logic [NREQ-1:0]      grant,
  output wr_cfg_t              grant_cfg,
  output cell_word_t           grant_word,
  input  logic [NREQ-1:0]      done,
  output logic [DEM_W-1:0]     avail,
  output logic                 ev_budget_stall  // a ready write waits for budget
);
  localparam int TW = 12;
  localparam int IW = $clog2(NREQ);
  typedef enum logic [1:0] { E_IDLE, E_PEND, E_ACT } est_e;

  est_e             st     [NREQ];
  wr_cfg_t          cfg    [NREQ];
  cell_word_t       word   [NREQ];
  logic [TW-1:0]    remain [NREQ];
  logic [7:0]       pen    [NREQ];
  logic [DEM_W-1:0] demand [NREQ];

  logic [IW-1:0]        rr_a, rr_b, pick_a, pick_b;
  logic                 pick_a_v, pick_b_v;
  logic                 s1_v;
  logic [IW-1:0]        s1_idx;
  logic [LINE_BITS-1:0] s1_data;

  logic [NREQ-1:0]  act_valid;
  logic [SEGC_W-1:0] seg_chg [NUM_SEGS];
  cell_word_t       enc_word;
  wr_cfg_t          sel_cfg;
  logic [TW-1:0]    sel_start, sel_finish;

  always_comb begin
    logic [DEM_W+4:0] used;
    used = '0;
    for (int i = 0; i < NREQ; i++) begin
      act_valid[i] = (st[i] == E_ACT);
      if (act_valid[i]) used = used + (DEM_W+5)'(demand[i]);
    end
    avail = (used >= (DEM_W+5)'(BUDGET)) ? '0 : DEM_W'((DEM_W+5)'(BUDGET) - used);
  end

  // Stage 1: accept a request (round robin from rr_a).
  always_comb begin
    pick_a_v = 1'b0; pick_a = '0;
    for (int n = NREQ-1; n >= 0; n--) begin
      logic [IW-1:0] i;
      i = IW'((32'(rr_a) + n) % NREQ);
      if (req_valid[i] && st[i] == E_IDLE && !(s1_v && s1_idx == i)) begin
        pick_a_v = 1'b1; pick_a = i;
      end
    end
    req_ack = '0;
    if (pick_a_v) req_ack[pick_a] = 1'b1;
    pw_rd_en   = pick_a_v;
    pw_rd_addr = req_addr[pick_a];
  end

  dw_fnw_encoder #(.FNW(FNW)) u_enc (
    .old_word(pw_rd_data), .new_data(s1_data), .new_word(enc_word), .seg_chg(seg_chg));

  bpb_config_select #(.NW(NREQ), .DCAP(DCAP), .T_SETUP(T_SET), .T_RND(T_RND), .TW(TW)) u_sel (
    .seg_chg(seg_chg), .avail(avail), .act_valid(act_valid), .act_demand(demand),
    .act_remain(remain), .choice(sel_cfg), .choice_start(sel_start),
    .choice_finish(sel_finish));

  // Stage 3: admit one ready pending write that fits (round robin from rr_b).
  always_comb begin
    pick_b_v = 1'b0; pick_b = '0; ev_budget_stall = 1'b0;
    for (int n = NREQ-1; n >= 0; n--) begin
      logic [IW-1:0] i;
      i = IW'((32'(rr_b) + n) % NREQ);
      if (st[i] == E_PEND && pen[i] == 0) begin
        if (cfg[i].demand <= avail) begin pick_b_v = 1'b1; pick_b = i; end
        else ev_budget_stall = 1'b1;
      end
    end
    grant = '0;
    if (pick_b_v) grant[pick_b] = 1'b1;
    grant_cfg  = cfg[pick_b];
    grant_word = word[pick_b];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rr_a <= '0; rr_b <= '0; s1_v <= 1'b0; s1_idx <= '0; s1_data <= '0;
      for (int i = 0; i < NREQ; i++) begin
        st[i] <= E_IDLE; cfg[i] <= '0; word[i] <= '0; remain[i] <= '0;
        pen[i] <= '0; demand[i] <= '0;
      end
    end else begin
      s1_v <= pick_a_v;
      if (pick_a_v) begin
        s1_idx  <= pick_a;
        s1_data <= req_data[pick_a];
        rr_a    <= IW'((32'(pick_a) + 1) % NREQ);
      end
      for (int i = 0; i < NREQ; i++) begin
        if (st[i] == E_ACT && remain[i] > 1) remain[i] <= remain[i] - 1'b1;
        if (st[i] == E_PEND && pen[i] != 0)  pen[i] <= pen[i] - 1'b1;
        if (st[i] == E_ACT && done[i])       st[i] <= E_IDLE;
      end
      if (s1_v) begin
        st[s1_idx]   <= E_PEND;
        cfg[s1_idx]  <= sel_cfg;
        word[s1_idx] <= enc_word;
        pen[s1_idx]  <= 8'(T_PEN - 1);
      end
      if (pick_b_v) begin
        st[pick_b]     <= E_ACT;
        demand[pick_b] <= cfg[pick_b].demand;
        remain[pick_b] <= TW'(T_SET + 32'(cfg[pick_b].nrounds) * T_RND);
        rr_b           <= IW'((32'(pick_b) + 1) % NREQ);
      end
    end

  for (genvar i = 0; i < NREQ; i++) begin : g_chk
    a_done_active: assert property (@(posedge clk) disable iff (!rst_n)
                                    done[i] |-> st[i] == E_ACT);
  end
endmodule
