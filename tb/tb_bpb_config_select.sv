// tb_bpb_config_select: the bit-change pattern of the document's example
// (8-round: 4, 5, 8 and 10 changed bits in four rounds; 4-round: 4, 5 and 18
// in three), then random patterns and running writes against a reference
// model written here.
module tb_bpb_config_select;
  import pcm_pkg::*;
  localparam int NW = 4, TW = 12;
  logic [SEGC_W-1:0] seg_chg [NUM_SEGS];
  logic [DEM_W-1:0]  avail;
  logic [NW-1:0]     act_valid;
  logic [DEM_W-1:0]  act_demand [NW];
  logic [TW-1:0]     act_remain [NW];
  wr_cfg_t           choice;
  logic [TW-1:0]     cs, cf;
  int checks = 0, failures = 0;
  int seen_cfg [4];

  bpb_config_select #(.NW(NW), .DCAP(64), .T_SETUP(80), .T_RND(40), .TW(TW)) dut (
    .seg_chg, .avail, .act_valid, .act_demand, .act_remain, .choice,
    .choice_start(cs), .choice_finish(cf));

  // reference: returns cfg, demand, rounds
  task automatic ref_model(output int rc, output int rd, output int rn, output int rf);
    int best_f;
    best_f = 1 << 30; rc = 0; rd = 0; rn = 0; rf = 0;
    for (int k = 0; k < 4; k++) begin
      int per, dem, nr, st, fin;
      per = 1 << k; dem = 0; nr = 0;
      for (int j = 0; j < 8 / per; j++) begin
        int sum = 0;
        for (int s = 0; s < per; s++) sum += seg_chg[j*per+s];
        if (sum > dem) dem = sum;
        if (sum > 0) nr++;
      end
      if (dem <= avail) st = 0;
      else begin
        st = -1;
        // walk running writes in finish order, adding freed budget
        for (int t = 0; t < 4096 && st < 0; t++) begin
          int fr = avail;
          for (int i = 0; i < NW; i++)
            if (act_valid[i] && act_remain[i] <= t) fr += act_demand[i];
          if (fr >= dem) st = t;
        end
      end
      if (st < 0) begin
        // the 8-round setting stays the fallback even if it cannot start yet
        if (k == 0) begin rc = 0; rd = dem; rn = nr; rf = -1; end
        continue;
      end
      fin = st + 80 + 40 * nr;
      if ((k == 0 || dem <= 64) && fin < best_f) begin
        best_f = fin; rc = k; rd = dem; rn = nr; rf = fin;
      end
    end
  endtask

  task automatic compare(input string what);
    int rc, rd, rn, rf;
    #1;
    ref_model(rc, rd, rn, rf);
    checks++;
    if (int'(choice.cfg) != rc || int'(choice.demand) != rd || int'(choice.nrounds) != rn ||
        (rf >= 0 && int'(cf) != rf)) begin
      failures++;
      $display("FAIL %s: cfg %0d/%0d dem %0d/%0d rounds %0d/%0d fin %0d/%0d", what,
               choice.cfg, rc, choice.demand, rd, choice.nrounds, rn, cf, rf);
    end
    seen_cfg[choice.cfg]++;
  endtask

  initial begin
    int pat [8] = '{0, 0, 4, 0, 0, 5, 8, 10};
    for (int s = 0; s < 8; s++) seg_chg[s] = SEGC_W'(pat[s]);
    act_valid = '0;
    for (int i = 0; i < NW; i++) begin act_demand[i] = '0; act_remain[i] = '0; end
    // plenty of budget: the 1-round setting (demand 27) finishes first
    avail = 11'd1024;
    compare("example, full budget");
    checks++;
    if (choice.cfg != 2'd3 || choice.demand != 27 || choice.nrounds != 1) begin
      failures++; $display("FAIL example full budget");
    end
    // only 12 bits free, a running write frees 200 after 300 cycles:
    // the 8-round setting (demand 10, 4 rounds, finish 240) wins
    avail = 11'd12; act_valid = 4'b0001; act_demand[0] = 11'd200; act_remain[0] = 12'd300;
    compare("example, little budget");
    checks++;
    if (choice.cfg != 2'd0 || choice.demand != 10 || choice.nrounds != 4 || cf != 240) begin
      failures++; $display("FAIL example little budget: cfg %0d", choice.cfg);
    end
    // 20 free, freeing soon: 4-round (demand 18, 3 rounds) is best
    avail = 11'd20; act_remain[0] = 12'd10;
    compare("example, 4-round");
    for (int it = 0; it < 3000; it++) begin
      for (int s = 0; s < 8; s++)
        seg_chg[s] = ($urandom_range(0, 2) == 0) ? '0 : SEGC_W'($urandom_range(0, 33));
      avail = 11'($urandom_range(0, 120));
      for (int i = 0; i < NW; i++) begin
        act_valid[i]  = 1'($urandom);
        act_demand[i] = 11'($urandom_range(0, 100));
        act_remain[i] = 12'($urandom_range(1, 500));
      end
      compare("random");
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen_cfg[k] == 0) begin failures++; $display("FAIL configuration %0d never chosen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
