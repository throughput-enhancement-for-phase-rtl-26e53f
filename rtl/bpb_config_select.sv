// bpb_config_select: the decision step of bit-level power budgeting (BPB).
//
// A 512-bit write can be done as 8 rounds of 64 bits, 4 of 128, 2 of 256 or
// 1 of 512. The power a configuration needs is the number of cells its
// busiest round changes; a round that changes nothing is skipped, so the
// latency is T_SETUP + (rounds with changes) * T_ROUND. Fewer, wider rounds are
// faster but need more power, and may therefore have to wait longer for
// power budget to become free. For every configuration this block computes
// the earliest possible start (now, if the free budget covers the demand;
// otherwise the projected finish of the earliest running write after which
// the freed budget suffices, assuming no other write starts meanwhile) and the
// earliest possible finish = start + latency. It picks the configuration with
// the earliest finish among those whose demand is at most DCAP; the
// 8-round configuration is always allowed. Ties go to more rounds (less
// power). Combinational.
//
// Inputs: per-segment changed-cell counts of the write (from dw_fnw_encoder),
// the budget free now, and for every running write its demand and the cycles
// left until its projected finish. The algorithm is the document's; the tie
// rule and the fallback to 8 rounds are this design's.
module bpb_config_select
  import pcm_pkg::*;
#(
  parameter int NW         = 2 * NUM_BANKS,  // running writes tracked
  parameter int DCAP       = pcm_pkg::DEMAND_CAP,
  parameter int T_SETUP    = T_WR_SETUP,
  parameter int T_RND      = T_ROUND,
  parameter int TW         = 12              // width of time values
) (
  input  logic [SEGC_W-1:0] seg_chg [NUM_SEGS],
  input  logic [DEM_W-1:0]  avail,
  input  logic [NW-1:0]     act_valid,
  input  logic [DEM_W-1:0]  act_demand [NW],
  input  logic [TW-1:0]     act_remain [NW],
  output wr_cfg_t           choice,
  output logic [TW-1:0]     choice_start,
  output logic [TW-1:0]     choice_finish
);
  localparam logic [TW:0] INF = {1'b1, {TW{1'b0}}};

  logic [DEM_W-1:0] dem   [NUM_CFGS];
  logic [3:0]       nred  [NUM_CFGS];
  logic [TW:0]      start [NUM_CFGS];
  logic [TW+1:0]    fin   [NUM_CFGS];
  logic [DEM_W+4:0] freed [NW];

  // Budget freed once running write i has finished (all writes due no later).
  always_comb begin
    for (int i = 0; i < NW; i++) begin
      freed[i] = '0;
      for (int j = 0; j < NW; j++)
        if (act_valid[j] && act_remain[j] <= act_remain[i])
          freed[i] = freed[i] + (DEM_W+5)'(act_demand[j]);
    end
  end

  always_comb begin
    for (int k = 0; k < NUM_CFGS; k++) begin
      dem[k]  = '0;
      nred[k] = '0;
      for (int j = 0; j < (NUM_SEGS >> k); j++) begin
        logic [DEM_W-1:0] rd;
        rd = '0;
        for (int s = 0; s < (1 << k); s++)
          rd = rd + DEM_W'(seg_chg[j*(1<<k) + s]);
        if (rd > dem[k]) dem[k] = rd;
        if (rd != 0)     nred[k] = nred[k] + 4'd1;
      end
      if (dem[k] <= avail) start[k] = '0;
      else begin
        start[k] = INF;
        for (int i = 0; i < NW; i++)
          if (act_valid[i] && ((DEM_W+5)'(avail) + freed[i] >= (DEM_W+5)'(dem[k]))
              && {1'b0, act_remain[i]} < start[k])
            start[k] = {1'b0, act_remain[i]};
      end
      fin[k] = (TW+2)'(start[k]) + (TW+2)'(T_SETUP) + (TW+2)'(nred[k]) * (TW+2)'(T_RND);
    end
  end

  always_comb begin
    logic [1:0] best;
    best = 0;
    for (int k = 1; k < NUM_CFGS; k++)
      if (32'(dem[k]) <= DCAP && start[k] != INF && fin[k] < fin[best]) best = 2'(k);
    choice.cfg     = best;
    choice.demand  = dem[best];
    choice.nrounds = nred[best];
    choice_start   = start[best][TW-1:0];
    choice_finish  = fin[best][TW-1:0];
  end
endmodule
