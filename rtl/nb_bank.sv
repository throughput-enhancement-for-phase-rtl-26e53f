// nb_bank: one non-blocking PCM bank with its bank queue and scheduler.
//
// A conventional PCM bank serves one request at a time, so a 1 us write
// blocks every read behind it. Here the left and right half of the bank each
// have a write slot and a read slot, so up to two writes and two reads run at
// once, provided no two of them use the same array column (they would share
// the global bitlines). The shared row, H and V decoders are handed from one
// access to the next after three cycles (bank_wl_ctrl).
//
// Bank queue: Q entries in age order (index 0 oldest), compacted on removal.
// At a new_batch pulse the oldest MARK_CAP/2 requests of every thread in
// every half bank are marked (PAR-BS/Half). Whenever the previous issue group
// is used up, rawp_select forms a new one; its members leave the queue in
// group order, each as soon as it can:
//   write: its half's write slot is free and no read runs in its column;
//          the slot then asks power_budget_mgr for a configuration and for
//          budget, then takes the decoders, then runs T_SET cycles of set-up
//          and one T_RND cycle round per round with bit changes, and finally
//          writes the encoded word to the cells and releases its budget;
//   read:  its half's read slot is free. If no write of its half holds its
//          column, it takes the decoders at once. If one does, with read
//          insertion (RAWP) the read waits in its slot until that write
//          reaches the end of a round (or has not yet opened its array);
//          the write then drops its W command, the read runs, and the write
//          takes the decoders again to resume. Without read insertion (AWP)
//          the read waits in the queue until the write is done.
// A read returns its data T_HIT cycles (row-buffer hit) or T_MISS cycles
// (miss) after its command; a miss keeps its slot and column for FILL*T_MISS
// cycles while it fills a 256 B row-buffer entry. The row buffer is
// write-through, so this model keeps only its tags (row_buffer_tags) and
// reads the line from the cells in both cases; hits differ in timing only.
// Slots, conflicts, read insertion, write rounds and latencies follow the
// document; queue depth, the decoder hand-over timing, the arbitration
// between slots and the per-slot handshakes are this design's.
module nb_bank
  import pcm_pkg::*;
#(
  parameter int     Q        = 16,
  parameter sched_e SCHED    = SCHED_RAWP,
  parameter int     ROWS     = ROWS_PER_ARRAY,
  parameter int     MARK_CAP = 4,
  parameter int     NT       = NUM_THREADS,
  parameter int     T_MISS   = T_RD_MISS,
  parameter int     T_HIT    = T_RD_HIT,
  parameter int     T_SET    = T_WR_SETUP,
  parameter int     T_RND    = T_ROUND,
  parameter int     FILL     = FILL_READS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // requests from the controller's dispatcher
  input  logic                 in_valid,
  input  pcm_req_t             in_req,
  output logic                 in_ready,
  // PAR-BS
  input  logic                 new_batch,
  input  logic [$clog2(NT)-1:0] thread_rank [NT],
  output logic [4:0]           marked_cnt [NT],
  output logic                 busy,
  // power budgeting, one port per half bank
  output logic [1:0]           bpb_req,
  output pcm_addr_t            bpb_addr [2],
  output logic [LINE_BITS-1:0] bpb_data [2],
  input  logic [1:0]           bpb_ack,
  input  logic [1:0]           bpb_grant,
  input  wr_cfg_t              grant_cfg,
  input  cell_word_t           grant_word,
  output logic [1:0]           wr_done,
  // cell array data side, one port per half bank
  output logic [1:0]           arr_rd_en,
  output pcm_addr_t            arr_rd_addr [2],
  input  cell_word_t           arr_rd_data [2],   // the cycle after arr_rd_en
  output logic [1:0]           arr_wr_en,
  output pcm_addr_t            arr_wr_addr [2],
  output cell_word_t           arr_wr_data [2],
  // read responses
  output logic [1:0]           resp_valid,
  output pcm_resp_t            resp [2],
  input  logic [1:0]           resp_ack,
  // wordline side of the cell arrays
  output logic [7:0]           h_o,
  output logic [7:0]           v_o,
  output logic [63:0]          en_o,
  output logic [ROWS-1:0]      lwl_o [64],
  output bank_ev_t             ev
);
  localparam int  IW       = $clog2(Q);
  localparam bit  READ_INS = (SCHED == SCHED_RAWP);
  localparam int  RW       = $clog2(NT);
  localparam int  CW       = 9;

  typedef enum logic [2:0] { W_IDLE, W_BPB, W_GWAIT, W_DREQ, W_DEC, W_SETUP, W_ROUND,
                             W_PAUSE } wst_e;
  typedef enum logic [1:0] { R_IDLE, R_INS, R_DEC, R_ACT } rst_e;

  // ---------------- bank queue ----------------
  pcm_req_t       q_req    [Q];
  logic [Q-1:0]   q_v, q_marked, q_ingrp;
  logic [1:0]     q_gpos   [Q];
  logic [2:0]     grp_next;
  logic [IW:0]    q_cnt;

  // ---------------- slots ----------------
  wst_e             wst  [2];
  pcm_addr_t        wadr [2];
  logic [LINE_BITS-1:0] wdat [2];
  wr_cfg_t          wcfg [2];
  cell_word_t       wword[2];
  logic [CW-1:0]    wcnt [2];
  logic [3:0]       wrnd [2];
  logic             wres [2];   // resume after a pause

  rst_e             rst  [2];
  pcm_req_t         rreq [2];
  logic             rhit [2];
  logic [CW-1:0]    rlat [2], rocc [2];
  logic             rcap [2];   // capture read data this cycle
  logic             rdone[2];   // response produced

  logic             rsp_v [2];
  pcm_resp_t        rsp   [2];
  logic [LINE_BITS-1:0] rbuf [2];   // decoded read data waiting for its latency

  // ---------------- decoders ----------------
  logic             dec_busy;
  logic [1:0]       dec_cnt;
  pcm_addr_t        dec_adr;

  // ---------------- row buffer ----------------
  logic [TAG_W-1:0] look_tag [Q];
  logic [Q-1:0]     e_hit;
  logic             rb_upd;
  pcm_addr_t        rb_adr;

  for (genvar e = 0; e < Q; e++) begin : g_tag
    assign look_tag[e] = tag_of(q_req[e].addr);
  end

  row_buffer_tags #(.ENTRIES(RB_ENTRIES), .NLOOK(Q)) u_rb (
    .clk, .rst_n, .look_tag(look_tag), .look_hit(e_hit), .upd_en(rb_upd),
    .upd_tag(tag_of(rb_adr)));

  // ---------------- reordering ----------------
  logic [2:0]    e_col  [Q];
  logic [RW-1:0] e_rank [Q];
  logic [Q-1:0]  e_we;
  logic [1:0]    wslot_free, rslot_free, wbusy, rbusy;
  logic [2:0]    wcol [2], rcol [2];
  logic [2:0]    sel_cnt;
  logic [IW-1:0] sel_idx [4];

  always_comb begin
    for (int e = 0; e < Q; e++) begin
      e_col[e]  = q_req[e].addr.arr_col;
      e_rank[e] = thread_rank[q_req[e].tid];
      e_we[e]   = q_req[e].we;
    end
    for (int h = 0; h < 2; h++) begin
      wslot_free[h] = (wst[h] == W_IDLE);
      rslot_free[h] = (rst[h] == R_IDLE);
      wbusy[h]      = (wst[h] != W_IDLE);
      rbusy[h]      = (rst[h] != R_IDLE);
      wcol[h]       = wadr[h].arr_col;
      rcol[h]       = rreq[h].addr.arr_col;
    end
  end

  rawp_select #(.Q(Q), .SCHED(SCHED), .RW(RW)) u_sel (
    .e_valid(q_v), .e_we(e_we), .e_col(e_col), .e_hit(e_hit), .e_marked(q_marked),
    .e_rank(e_rank), .wslot_free(wslot_free), .rslot_free(rslot_free), .wbusy(wbusy),
    .wcol(wcol), .rbusy(rbusy), .rcol(rcol), .grp_cnt(sel_cnt), .grp_idx(sel_idx));

  // ---------------- issue decision ----------------
  logic          grp_empty, head_v, form;
  logic [IW-1:0] head;
  pcm_req_t      hreq;
  logic          hh;            // half of the head
  logic          iss, iss_wr, iss_rd_now, iss_rd_ins;
  logic          w_hold [2];    // write holds its column (array open)
  logic          r_hold [2];    // read holds its column
  logic          wdec_req [2], rdec_req [2];
  logic          dec_go;
  logic [1:0]    dec_go_user;
  logic          head_conf;

  always_comb begin
    grp_empty = (q_v & q_ingrp) == '0;
    head_v = 1'b0; head = '0;
    for (int e = Q-1; e >= 0; e--)
      if (q_v[e] && q_ingrp[e] && 3'(q_gpos[e]) == grp_next) begin head_v = 1'b1; head = IW'(e); end
    hreq = q_req[head];
    hh   = hreq.addr.arr_col[2];
    form = grp_empty && (sel_cnt != 0);

    for (int h = 0; h < 2; h++) begin
      w_hold[h] = (wst[h] == W_DEC) || (wst[h] == W_SETUP) || (wst[h] == W_ROUND);
      r_hold[h] = (rst[h] == R_DEC) || (rst[h] == R_ACT);
      // a write may take the decoders unless a read of its half owns its column
      wdec_req[h] = (wst[h] == W_DREQ) &&
                    !((rst[h] != R_IDLE) && rreq[h].addr.arr_col == wadr[h].arr_col);
      // an inserted read may start once the write has let go of the column
      rdec_req[h] = ((rst[h] == R_INS) && !w_hold[h] && (wst[h] != W_DREQ || !wdec_req[h]));
    end

    // decoder arbitration: writes, then waiting reads, then a new read
    dec_go = 1'b0; dec_go_user = '0;
    if (!dec_busy) begin
      if      (wdec_req[0]) begin dec_go = 1'b1; dec_go_user = 2'd2; end
      else if (wdec_req[1]) begin dec_go = 1'b1; dec_go_user = 2'd3; end
      else if (rdec_req[0]) begin dec_go = 1'b1; dec_go_user = 2'd0; end
      else if (rdec_req[1]) begin dec_go = 1'b1; dec_go_user = 2'd1; end
    end

    iss = 1'b0; iss_wr = 1'b0; iss_rd_now = 1'b0; iss_rd_ins = 1'b0;
    head_conf = 1'b0;
    ev.dec_stall = 1'b0; ev.col_stall = 1'b0;
    if (head_v) begin
      if (hreq.we) begin
        head_conf = (rst[hh] != R_IDLE) && rreq[hh].addr.arr_col == hreq.addr.arr_col;
        if (wst[hh] == W_IDLE && !head_conf) begin iss = 1'b1; iss_wr = 1'b1; end
        else ev.col_stall = 1'b1;
      end else if (rst[hh] == R_IDLE) begin
        head_conf = (wst[hh] != W_IDLE) && wadr[hh].arr_col == hreq.addr.arr_col;
        if (head_conf && READ_INS) begin iss = 1'b1; iss_rd_ins = 1'b1; end
        else if (head_conf) ev.col_stall = 1'b1;
        else if (!dec_busy && !dec_go) begin iss = 1'b1; iss_rd_now = 1'b1; end
        else ev.dec_stall = 1'b1;
      end else ev.col_stall = 1'b1;
    end
    rb_upd = iss;
    rb_adr = hreq.addr;
  end

  // ---------------- decoder sequence and wordline control ----------------
  logic [1:0] w_cmd, r_cmd;
  always_comb
    for (int h = 0; h < 2; h++) begin
      w_cmd[h] = (wst[h] == W_SETUP) || (wst[h] == W_ROUND) ||
                 ((wst[h] == W_DEC) && dec_cnt == 2'd2);
      r_cmd[h] = (rst[h] == R_ACT) || ((rst[h] == R_DEC) && dec_cnt == 2'd2);
    end

  bank_wl_ctrl #(.ROWS(ROWS)) u_wl (
    .clk, .rst_n, .row_en(dec_busy), .arr_row(dec_adr.arr_row),
    .row(dec_adr.row[$clog2(ROWS)-1:0]), .col_en(dec_busy && dec_cnt != 2'd0),
    .arr_col(dec_adr.arr_col), .w_cmd(w_cmd), .r_cmd(r_cmd), .h(h_o), .v(v_o),
    .en(en_o), .lwl(lwl_o));

  // ---------------- outputs ----------------
  always_comb begin
    in_ready = (q_cnt < (IW+1)'(Q));
    busy     = (q_cnt != 0);
    for (int t = 0; t < NT; t++) begin
      marked_cnt[t] = '0;
      for (int e = 0; e < Q; e++)
        if (q_v[e] && q_marked[e] && q_req[e].tid == RW'(t)) marked_cnt[t] = marked_cnt[t] + 1'b1;
    end
    for (int h = 0; h < 2; h++) begin
      bpb_req[h]     = (wst[h] == W_BPB);
      bpb_addr[h]    = wadr[h];
      bpb_data[h]    = wdat[h];
      arr_rd_en[h]   = (rst[h] == R_DEC) && dec_cnt == 2'd2;
      arr_rd_addr[h] = rreq[h].addr;
      arr_wr_addr[h] = wadr[h];
      arr_wr_data[h] = wword[h];
      resp_valid[h]  = rsp_v[h];
      resp[h]        = rsp[h];
      // a write is done at the end of its last round (or set-up if none)
      wr_done[h]   = ((wst[h] == W_SETUP) && wcnt[h] == 0 && wcfg[h].nrounds == 0) ||
                     ((wst[h] == W_ROUND) && wcnt[h] == 0 && wrnd[h] == 4'd1);
      arr_wr_en[h] = wr_done[h];
    end
    ev.grp_formed  = form;
    ev.fallback    = form && sel_cnt == 3'd1;
    ev.iss_rd_hit  = iss && !hreq.we && e_hit[head];
    ev.iss_rd_miss = iss && !hreq.we && !e_hit[head];
    ev.iss_wr_hit  = iss && hreq.we && e_hit[head];
    ev.iss_wr_miss = iss && hreq.we && !e_hit[head];
    ev.rd_insert   = ((rst[0] == R_INS) && rdec_req[0] && dec_go && dec_go_user == 2'd0) ||
                     ((rst[1] == R_INS) && rdec_req[1] && dec_go && dec_go_user == 2'd1);
    ev.ww_par      = w_hold[0] && w_hold[1];
    ev.rw_par      = (r_hold[0] || r_hold[1]) && (w_hold[0] || w_hold[1]);
    ev.rr_par      = r_hold[0] && r_hold[1];
    ev.round_skip  = (bpb_grant[0] && wst[0] == W_GWAIT &&
                      32'(grant_cfg.nrounds) < (8 >> grant_cfg.cfg)) ||
                     (bpb_grant[1] && wst[1] == W_GWAIT &&
                      32'(grant_cfg.nrounds) < (8 >> grant_cfg.cfg));
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q_v <= '0; q_marked <= '0; q_ingrp <= '0; q_cnt <= '0; grp_next <= '0;
      for (int e = 0; e < Q; e++) begin q_req[e] <= '0; q_gpos[e] <= '0; end
      dec_busy <= 1'b0; dec_cnt <= '0; dec_adr <= '0;
      for (int h = 0; h < 2; h++) begin
        wst[h] <= W_IDLE; wadr[h] <= '0; wdat[h] <= '0; wcfg[h] <= '0; wword[h] <= '0;
        wcnt[h] <= '0; wrnd[h] <= '0; wres[h] <= 1'b0;
        rst[h] <= R_IDLE; rreq[h] <= '0; rhit[h] <= 1'b0; rlat[h] <= '0; rocc[h] <= '0;
        rcap[h] <= 1'b0; rdone[h] <= 1'b0; rsp_v[h] <= 1'b0; rsp[h] <= '0;
        rbuf[h] <= '0;
      end
    end else begin
      // ---- queue: marking, group forming, removal, append ----
      begin
        pcm_req_t     n_req [Q];
        logic [Q-1:0] n_v, n_m, n_g;
        logic [1:0]   n_p [Q];
        logic [2:0]   cnt_th [NT][2];
        logic [IW:0]  n_cnt;
        n_req = q_req; n_v = q_v; n_m = q_marked; n_g = q_ingrp; n_p = q_gpos;
        n_cnt = q_cnt;
        if (new_batch) begin
          for (int t = 0; t < NT; t++) begin cnt_th[t][0] = '0; cnt_th[t][1] = '0; end
          for (int e = 0; e < Q; e++) begin
            logic hf;
            hf = q_req[e].addr.arr_col[2];
            n_m[e] = 1'b0;
            if (q_v[e] && 32'(cnt_th[q_req[e].tid][hf]) < MARK_CAP / 2) begin
              n_m[e] = 1'b1;
              cnt_th[q_req[e].tid][hf] = cnt_th[q_req[e].tid][hf] + 1'b1;
            end
          end
        end
        if (form) begin
          for (int i = 0; i < 4; i++)
            if (3'(i) < sel_cnt) begin n_g[sel_idx[i]] = 1'b1; n_p[sel_idx[i]] = 2'(i); end
          grp_next <= '0;
        end
        if (iss) begin
          for (int e = 0; e < Q - 1; e++)
            if (e >= 32'(head)) begin
              n_req[e] = n_req[e+1]; n_v[e] = n_v[e+1]; n_m[e] = n_m[e+1];
              n_g[e] = n_g[e+1]; n_p[e] = n_p[e+1];
            end
          n_v[Q-1] = 1'b0; n_g[Q-1] = 1'b0; n_m[Q-1] = 1'b0;
          n_cnt = n_cnt - 1'b1;
          grp_next <= grp_next + 1'b1;
        end
        if (in_valid && in_ready) begin
          n_req[n_cnt[IW-1:0]] = in_req;
          n_v[n_cnt[IW-1:0]]   = 1'b1;
          n_m[n_cnt[IW-1:0]]   = 1'b0;
          n_g[n_cnt[IW-1:0]]   = 1'b0;
          n_p[n_cnt[IW-1:0]]   = '0;
          n_cnt = n_cnt + 1'b1;
        end
        q_req <= n_req; q_v <= n_v; q_marked <= n_m; q_ingrp <= n_g; q_gpos <= n_p;
        q_cnt <= n_cnt;
      end

      // ---- decoders ----
      if (dec_go) begin
        dec_busy <= 1'b1; dec_cnt <= '0;
        dec_adr  <= dec_go_user[1] ? wadr[dec_go_user[0]] : rreq[dec_go_user[0]].addr;
      end else if (iss_rd_now) begin
        dec_busy <= 1'b1; dec_cnt <= '0; dec_adr <= hreq.addr;
      end else if (dec_busy) begin
        if (dec_cnt == 2'd2) dec_busy <= 1'b0;
        dec_cnt <= dec_cnt + 1'b1;
      end

      // ---- write slots ----
      for (int h = 0; h < 2; h++) begin
        case (wst[h])
          W_IDLE:  if (iss_wr && hh == 1'(h)) begin
                     wst[h] <= W_BPB; wadr[h] <= hreq.addr; wdat[h] <= hreq.wdata;
                     wres[h] <= 1'b0;
                   end
          W_BPB:   if (bpb_ack[h]) wst[h] <= W_GWAIT;
          W_GWAIT: if (bpb_grant[h]) begin
                     wst[h] <= W_DREQ; wcfg[h] <= grant_cfg; wword[h] <= grant_word;
                     wrnd[h] <= grant_cfg.nrounds;
                   end
          W_DREQ:  if (dec_go && dec_go_user == {1'b1, 1'(h)}) wst[h] <= W_DEC;
          W_DEC:   if (dec_cnt == 2'd2) begin
                     if (wres[h]) begin wst[h] <= W_ROUND; wcnt[h] <= CW'(T_RND - 1); end
                     else begin wst[h] <= W_SETUP; wcnt[h] <= CW'(T_SET - 1); end
                   end
          W_SETUP: if (wcnt[h] != 0) wcnt[h] <= wcnt[h] - 1'b1;
                   else if (wcfg[h].nrounds == 0) wst[h] <= W_IDLE;
                   else begin wst[h] <= W_ROUND; wcnt[h] <= CW'(T_RND - 1); end
          W_ROUND: if (wcnt[h] != 0) wcnt[h] <= wcnt[h] - 1'b1;
                   else if (wrnd[h] == 4'd1) wst[h] <= W_IDLE;
                   else begin
                     wrnd[h] <= wrnd[h] - 1'b1;
                     if (READ_INS && rst[h] == R_INS) begin
                       wst[h] <= W_PAUSE; wres[h] <= 1'b1;
                     end else wcnt[h] <= CW'(T_RND - 1);
                   end
          W_PAUSE: if (rst[h] == R_IDLE || rreq[h].addr.arr_col != wadr[h].arr_col)
                     wst[h] <= W_DREQ;
          default: wst[h] <= W_IDLE;
        endcase
      end

      // ---- read slots ----
      for (int h = 0; h < 2; h++) begin
        rcap[h] <= 1'b0;
        if (rcap[h])
          for (int s = 0; s < NUM_SEGS; s++)
            rbuf[h][s*SEG_BITS +: SEG_BITS] <=
              arr_rd_data[h].data[s*SEG_BITS +: SEG_BITS] ^ {SEG_BITS{arr_rd_data[h].flip[s]}};
        if (resp_ack[h]) rsp_v[h] <= 1'b0;
        case (rst[h])
          R_IDLE: if ((iss_rd_now || iss_rd_ins) && hh == 1'(h)) begin
                    rreq[h] <= hreq; rhit[h] <= e_hit[head]; rdone[h] <= 1'b0;
                    rst[h]  <= iss_rd_ins ? R_INS : R_DEC;
                  end
          R_INS:
                  if (dec_go && dec_go_user == {1'b0, 1'(h)}) rst[h] <= R_DEC;
          R_DEC:  if (dec_cnt == 2'd2) begin
                    rst[h]  <= R_ACT; rcap[h] <= 1'b1;
                    rlat[h] <= CW'((rhit[h] ? T_HIT : T_MISS) - 1);
                    rocc[h] <= CW'((rhit[h] ? T_HIT : FILL * T_MISS) - 1);
                  end
          R_ACT: begin
                   if (rlat[h] != 0) rlat[h] <= rlat[h] - 1'b1;
                   else if (!rdone[h] && (!rsp_v[h] || resp_ack[h])) begin
                     rsp_v[h] <= 1'b1; rdone[h] <= 1'b1;
                     rsp[h]   <= '{id: rreq[h].id, tid: rreq[h].tid, data: rbuf[h]};
                   end
                   if (rocc[h] != 0) rocc[h] <= rocc[h] - 1'b1;
                   else if (rdone[h]) rst[h] <= R_IDLE;
                 end
          default: rst[h] <= R_IDLE;
        endcase
      end
    end

  // Handshake rules.
  for (genvar h = 0; h < 2; h++) begin : g_chk
    a_grant_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                       bpb_grant[h] |-> wst[h] == W_GWAIT);
    a_no_col_share: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(w_hold[h] && r_hold[h] &&
                                       wadr[h].arr_col == rreq[h].addr.arr_col));
  end
endmodule
