// tb_rawp_select: the document's examples for RAWP and for the in-order /
// out-of-order comparison, plus read insertion, the PAR-BS fallback and the
// write ranking criteria. One RAWP and one AWP instance see the same queue.
module tb_rawp_select;
  import pcm_pkg::*;
  localparam int Q = 8;
  logic [Q-1:0] e_valid, e_we, e_hit, e_marked;
  logic [2:0]   e_col [Q];
  logic [1:0]   e_rank [Q];
  logic [1:0]   wslot_free, rslot_free, wbusy, rbusy;
  logic [2:0]   wcol [2], rcol [2];
  logic [2:0]   cnt_r, cnt_a;
  logic [2:0]   idx_r [4], idx_a [4];
  int checks = 0, failures = 0;

  rawp_select #(.Q(Q), .SCHED(SCHED_RAWP), .RW(2)) u_r (
    .e_valid, .e_we, .e_col, .e_hit, .e_marked, .e_rank, .wslot_free, .rslot_free, .wbusy,
    .wcol, .rbusy, .rcol, .grp_cnt(cnt_r), .grp_idx(idx_r));
  rawp_select #(.Q(Q), .SCHED(SCHED_AWP), .RW(2)) u_a (
    .e_valid, .e_we, .e_col, .e_hit, .e_marked, .e_rank, .wslot_free, .rslot_free, .wbusy,
    .wcol, .rbusy, .rcol, .grp_cnt(cnt_a), .grp_idx(idx_a));

  task automatic clear();
    e_valid = '0; e_we = '0; e_hit = '0; e_marked = '0;
    for (int i = 0; i < Q; i++) begin e_col[i] = '0; e_rank[i] = '0; end
    wslot_free = 2'b11; rslot_free = 2'b11; wbusy = '0; rbusy = '0;
    wcol[0] = 0; wcol[1] = 0; rcol[0] = 0; rcol[1] = 0;
  endtask
  task automatic ent(input int i, input bit w, input int col, input bit hit);
    e_valid[i] = 1; e_we[i] = w; e_col[i] = 3'(col); e_hit[i] = hit; e_marked[i] = 1;
  endtask
  task automatic expect_grp(input bit awp, input int n, input int g0, input int g1,
                            input int g2, input int g3, input string what);
    int g [4];
    logic [2:0] c;
    g = '{g0, g1, g2, g3};
    #1;
    c = awp ? cnt_a : cnt_r;
    checks++;
    if (int'(c) != n) begin failures++; $display("FAIL %s: count %0d exp %0d", what, c, n); end
    else for (int i = 0; i < n; i++) begin
      checks++;
      if (int'(awp ? idx_a[i] : idx_r[i]) != g[i]) begin
        failures++; $display("FAIL %s: position %0d holds %0d exp %0d", what, i,
                             awp ? idx_a[i] : idx_r[i], g[i]);
      end
    end
  endtask

  initial begin
    // RAWP example: W1* R2 R3* R4 W5 R6* R7 R8, W1 R3 R4 left, * = row hit.
    clear();
    ent(0, 1, 0, 1); ent(1, 0, 4, 0); ent(2, 0, 1, 1); ent(3, 0, 2, 0);
    ent(4, 1, 5, 0); ent(5, 0, 6, 1); ent(6, 0, 7, 0); ent(7, 0, 4, 0);
    expect_grp(0, 4, 0, 2, 5, 4, "RAWP example: W1* R3* R6* W5");

    // In-order example: W1 R2 R3 R4 R5 W6 R7 R8; left: W1 R2 R4 R5 R8, right: W6 R3 R7;
    // W1 conflicts with R5, R3 with W6.
    clear();
    ent(0, 1, 0, 0); ent(1, 0, 1, 0); ent(2, 0, 4, 0); ent(3, 0, 2, 0);
    ent(4, 0, 0, 0); ent(5, 1, 4, 0); ent(6, 0, 5, 0); ent(7, 0, 3, 0);
    expect_grp(1, 4, 0, 5, 1, 6, "AWP: W1 W6 R2 R7");
    expect_grp(0, 2, 0, 5, 0, 0, "RAWP: write misses W1 W6, read misses left out");

    // running write in left column 0: RAWP takes the conflicting read hit (insertion),
    // AWP the non-conflicting miss
    clear();
    wslot_free = 2'b10; wbusy = 2'b01; wcol[0] = 3'd0;
    ent(0, 0, 0, 1); ent(1, 0, 1, 0);
    expect_grp(0, 1, 0, 0, 0, 0, "RAWP read insertion candidate");
    expect_grp(1, 1, 1, 0, 0, 0, "AWP avoids conflict");

    // only read misses: PAR-BS pick (marked first)
    clear();
    ent(0, 0, 1, 0); e_marked[0] = 0; e_rank[0] = 3;
    ent(1, 0, 2, 0); e_rank[1] = 0;
    expect_grp(0, 1, 1, 0, 0, 0, "fallback picks the marked read");

    // write ranking: row hit beats age, rank beats conflicts, fewer conflicts beat age
    clear();
    ent(0, 1, 0, 0); ent(1, 1, 1, 1);
    expect_grp(0, 1, 1, 0, 0, 0, "write row hit first");
    clear();
    ent(0, 1, 0, 0); ent(1, 1, 1, 0); e_rank[1] = 2; ent(2, 0, 1, 0);
    rslot_free = 2'b00; rbusy = 2'b00;
    expect_grp(0, 1, 1, 0, 0, 0, "higher thread rank");
    clear();
    ent(0, 1, 0, 0); ent(1, 1, 1, 0); ent(2, 0, 0, 0); ent(3, 0, 0, 0);
    rslot_free = 2'b00;
    expect_grp(0, 1, 1, 0, 0, 0, "fewer conflicting reads");
    // no write in the column of a running read
    clear();
    ent(0, 1, 2, 1); ent(1, 1, 3, 0); rslot_free = 2'b10; rbusy = 2'b01; rcol[0] = 3'd2;
    expect_grp(0, 1, 1, 0, 0, 0, "write avoids running read column");
    // no free slot: no group
    clear();
    ent(0, 1, 2, 1); wslot_free = 2'b10; rslot_free = 2'b00;
    expect_grp(0, 0, 0, 0, 0, 0, "no free slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
