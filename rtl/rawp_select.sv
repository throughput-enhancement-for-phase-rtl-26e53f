// rawp_select: intra-bank reordering of a bank queue (RAWP, or AWP).
//
// A non-blocking bank has four slots: one write and one read slot per half
// bank. Two accesses in the same array column can never run together. This
// block looks at the bank queue and the slot state and forms the next "issue
// group", the requests to be moved to the head of the queue, in order. It is
// called again only when the previous group has been issued entirely.
//
// RAWP (row-hit aware write precedence), default:
//  step 1, one candidate per free slot, write slots first (left, right), then
//   read slots (left, right); for a write slot the best write of that half by
//   (marked in batch, row hit, thread rank, fewest queued reads in its
//   column), excluding writes in the column of a running read of that half;
//   for a read slot the best read of that half by (marked, row hit, not in
//   the column of a write candidate of that half, thread rank). A read in the
//   column of a running write counts as non-conflicting, because read
//   insertion lets it in between two rounds of that write.
//  step 2, the group is: write row hits, read row hits, write row misses, each
//   in slot order. Read misses are not taken.
// AWP (aggressive write precedence), SCHED = SCHED_AWP: per free slot, write
//  slots first, the oldest request (marked ones first) of that kind and half
//  that conflicts with no running access and no earlier candidate; the group
//  is the candidates in selection order.
// If no group results but a slot is free, the group is the single request
// PAR-BS would pick (marked, row hit, thread rank, oldest) among those whose
// slot is free, so read misses are served in PAR-BS order.
// Ties always go to the older entry (lower index; index 0 is the oldest).
// Combinational. Criteria, their order and the group order are the
// document's; tie rules, the fallback and the column rule for write
// candidates are this design's.
module rawp_select
  import pcm_pkg::*;
#(
  parameter int     Q     = 16,
  parameter sched_e SCHED = SCHED_RAWP,
  parameter int     RW    = $clog2(NUM_THREADS)
) (
  input  logic [Q-1:0]  e_valid,
  input  logic [Q-1:0]  e_we,
  input  logic [2:0]    e_col  [Q],   // array column; bit 2 is the half
  input  logic [Q-1:0]  e_hit,        // row-buffer hit now
  input  logic [Q-1:0]  e_marked,     // in the current batch
  input  logic [RW-1:0] e_rank [Q],   // thread rank, higher is better
  input  logic [1:0]    wslot_free,
  input  logic [1:0]    rslot_free,
  input  logic [1:0]    wbusy,        // a write holds a column of this half
  input  logic [2:0]    wcol [2],
  input  logic [1:0]    rbusy,        // a read holds a column of this half
  input  logic [2:0]    rcol [2],
  output logic [2:0]    grp_cnt,      // 0 .. 4
  output logic [$clog2(Q)-1:0] grp_idx [4]
);
  localparam int IW = $clog2(Q);

  logic [3:0]    nconf [Q];
  logic          wc_v [2], rc_v [2];
  logic [IW-1:0] wc_i [2], rc_i [2];

  always_comb begin
    for (int e = 0; e < Q; e++) begin
      nconf[e] = '0;
      for (int f = 0; f < Q; f++)
        if (e_valid[f] && !e_we[f] && e_col[f] == e_col[e] && nconf[e] != 4'hf)
          nconf[e] = nconf[e] + 4'd1;
    end
  end

  always_comb begin
    logic [IW-1:0] list [4];
    logic [2:0]    n;
    logic [RW+5:0] wbest, wsc;
    logic [RW+2:0] rbest, rsc;
    logic [RW+1:0] fbest, fsc;
    logic          found;
    n = '0; wbest = '0; wsc = '0; rbest = '0; rsc = '0; fbest = '0; fsc = '0; found = 1'b0;
    for (int i = 0; i < 4; i++) list[i] = '0;
    for (int h = 0; h < 2; h++) begin
      wc_v[h] = 1'b0; wc_i[h] = '0; rc_v[h] = 1'b0; rc_i[h] = '0;
    end
    if (SCHED == SCHED_RAWP) begin
      // write slots
      for (int h = 0; h < 2; h++) begin
        wbest = '0;
        if (wslot_free[h])
          for (int e = 0; e < Q; e++)
            if (e_valid[e] && e_we[e] && e_col[e][2] == 1'(h) &&
                !(rbusy[h] && rcol[h] == e_col[e])) begin
              wsc = {e_marked[e], e_hit[e], e_rank[e], ~nconf[e]};
              if (!wc_v[h] || wsc > wbest) begin wc_v[h] = 1'b1; wc_i[h] = IW'(e); wbest = wsc; end
            end
      end
      // read slots
      for (int h = 0; h < 2; h++) begin
        rbest = '0;
        if (rslot_free[h])
          for (int e = 0; e < Q; e++)
            if (e_valid[e] && !e_we[e] && e_col[e][2] == 1'(h)) begin
              rsc = {e_marked[e], e_hit[e],
                     !(wc_v[h] && e_col[wc_i[h]] == e_col[e]), e_rank[e]};
              if (!rc_v[h] || rsc > rbest) begin rc_v[h] = 1'b1; rc_i[h] = IW'(e); rbest = rsc; end
            end
      end
      for (int h = 0; h < 2; h++)
        if (wc_v[h] && e_hit[wc_i[h]]) begin list[n[1:0]] = wc_i[h]; n = n + 1'b1; end
      for (int h = 0; h < 2; h++)
        if (rc_v[h] && e_hit[rc_i[h]]) begin list[n[1:0]] = rc_i[h]; n = n + 1'b1; end
      for (int h = 0; h < 2; h++)
        if (wc_v[h] && !e_hit[wc_i[h]]) begin list[n[1:0]] = wc_i[h]; n = n + 1'b1; end
    end else begin
      // AWP
      for (int h = 0; h < 2; h++) begin
        if (wslot_free[h])
          for (int e = Q-1; e >= 0; e--)
            if (e_valid[e] && e_we[e] && e_col[e][2] == 1'(h) &&
                !(rbusy[h] && rcol[h] == e_col[e]) &&
                (!wc_v[h] || e_marked[e] || !e_marked[wc_i[h]])) begin
              wc_v[h] = 1'b1; wc_i[h] = IW'(e);
            end
      end
      for (int h = 0; h < 2; h++) begin
        if (rslot_free[h])
          for (int e = Q-1; e >= 0; e--)
            if (e_valid[e] && !e_we[e] && e_col[e][2] == 1'(h) &&
                !(wbusy[h] && wcol[h] == e_col[e]) &&
                !(wc_v[h] && e_col[wc_i[h]] == e_col[e]) &&
                (!rc_v[h] || e_marked[e] || !e_marked[rc_i[h]])) begin
              rc_v[h] = 1'b1; rc_i[h] = IW'(e);
            end
      end
      for (int h = 0; h < 2; h++)
        if (wc_v[h]) begin list[n[1:0]] = wc_i[h]; n = n + 1'b1; end
      for (int h = 0; h < 2; h++)
        if (rc_v[h]) begin list[n[1:0]] = rc_i[h]; n = n + 1'b1; end
    end
    // PAR-BS fallback
    if (n == 0) begin
      for (int e = 0; e < Q; e++)
        if (e_valid[e] && (e_we[e] ? wslot_free[e_col[e][2]] : rslot_free[e_col[e][2]])) begin
          fsc = {e_marked[e], e_hit[e], e_rank[e]};
          if (!found || fsc > fbest) begin found = 1'b1; fbest = fsc; list[0] = IW'(e); end
        end
      if (found) n = 3'd1;
    end
    grp_cnt = n;
    grp_idx = list;
  end
endmodule
