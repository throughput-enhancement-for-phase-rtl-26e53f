// pcm_top_env: test environment for pcm_nb_top, shared by the reduced and the
// full-size end-to-end testbenches. It drives clock, reset and requests,
// holds the cell arrays (pcm_cell_model) and checks what comes back.
//
// Traffic: NREQ requests from 4 threads, RD_PCT % reads, spread over all
// banks, array rows/columns and a few wordlines per array, with per-thread
// locality so that row-buffer hits occur. Write data change few bits of a
// line, only some segments (so rounds can be skipped), invert most of it (so
// Flip-N-Write stores inverted segments) or leave it unchanged. No request is
// sent to a line that still has a request outstanding, so the order of the
// requests to one line is never in question.
// Checked on the way: every read returns the line's current data; every cell
// read and write happens under its raised local wordline. At the end: every
// line written holds its last data, nothing is outstanding, and each of the
// mechanisms below has happened at least once (a mechanism that never
// happened is a failure, unless its bit is clear in REQUIRE):
//   0 issue group formed     1 PAR-BS fallback pick   2 read row hit issued
//   3 read miss issued       4 write row hit issued   5 write miss issued
//   6 read inserted in write 7 two writes in a bank   8 read beside a write
//   9 two reads in a bank   10 decoder conflict wait 11 column/slot wait
//  12 write rounds skipped  13 write held for budget 14 a new PAR-BS batch
//  15 segment stored inverted
module pcm_top_env
  import pcm_pkg::*;
#(
  parameter int          NB      = NUM_BANKS,
  parameter int          ROWS    = ROWS_PER_ARRAY,
  parameter int          NREQ    = 2000,
  parameter int          RD_PCT  = 60,
  parameter int          NROWS   = 4,          // wordlines used per array
  parameter int          MAXCYC  = 200000,
  parameter logic [15:0] REQUIRE = 16'hffff
) (
  output logic          clk,
  output logic          rst_n,
  output logic          req_valid,
  output pcm_req_t      req,
  input  logic          req_ready,
  input  logic          resp_valid,
  input  pcm_resp_t     resp,
  input  logic [1:0]    arr_rd_en   [NB],
  input  pcm_addr_t     arr_rd_addr [NB][2],
  output cell_word_t    arr_rd_data [NB][2],
  input  logic [1:0]    arr_wr_en   [NB],
  input  pcm_addr_t     arr_wr_addr [NB][2],
  input  cell_word_t    arr_wr_data [NB][2],
  input  logic          pw_rd_en,
  input  pcm_addr_t     pw_rd_addr,
  output cell_word_t    pw_rd_data,
  input  logic [ROWS-1:0] lwl_o [NB][64],
  input  bank_ev_t      ev_o [NB],
  input  logic          budget_stall,
  input  logic [15:0]   batch_count
);
  localparam int NP = 2 * NB;
  localparam int NMECH = 16;
  localparam string MNAME [NMECH] = '{"group formed", "fallback pick", "read hit", "read miss",
    "write hit", "write miss", "read insertion", "write-write overlap", "read-write overlap",
    "read-read overlap", "decoder wait", "column wait", "round skip", "budget stall",
    "new batch", "inverted segment"};

  logic [NP-1:0] c_rd_en, c_wr_en;
  pcm_addr_t     c_rd_addr [NP], c_wr_addr [NP];
  cell_word_t    c_rd_data [NP], c_wr_data [NP];
  for (genvar b = 0; b < NB; b++) begin : g_map
    for (genvar h = 0; h < 2; h++) begin : g_h
      assign c_rd_en[2*b+h]     = arr_rd_en[b][h];
      assign c_rd_addr[2*b+h]   = arr_rd_addr[b][h];
      assign arr_rd_data[b][h]  = c_rd_data[2*b+h];
      assign c_wr_en[2*b+h]     = arr_wr_en[b][h];
      assign c_wr_addr[2*b+h]   = arr_wr_addr[b][h];
      assign c_wr_data[2*b+h]   = arr_wr_data[b][h];
    end
  end

  pcm_cell_model #(.NP(NP)) u_cells (
    .clk, .rd_en(c_rd_en), .rd_addr(c_rd_addr), .rd_data(c_rd_data), .wr_en(c_wr_en),
    .wr_addr(c_wr_addr), .wr_data(c_wr_data), .pw_en(pw_rd_en), .pw_addr(pw_rd_addr),
    .pw_data(pw_rd_data));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, sent = 0, answered = 0, committed = 0;
  int mech [NMECH];
  int pend [int];                           // outstanding requests per line
  logic [LINE_BITS-1:0] ref_mem [int];      // last data sent per written line
  logic [LINE_BITS-1:0] exp_rd [256];
  pcm_addr_t            rd_addr_of [256];
  bit                   id_busy [256];
  pcm_addr_t            last_a [NUM_THREADS];
  logic [ID_W-1:0]      next_id;

  function automatic logic [LINE_BITS-1:0] plain(cell_word_t w);
    for (int s = 0; s < NUM_SEGS; s++)
      plain[s*SEG_BITS +: SEG_BITS] = w.data[s*SEG_BITS +: SEG_BITS] ^ {SEG_BITS{w.flip[s]}};
  endfunction
  function automatic logic [LINE_BITS-1:0] current(pcm_addr_t a);
    if (ref_mem.exists(int'(a))) return ref_mem[int'(a)];
    return plain(u_cells.initial_word(a));
  endfunction
  function automatic bit line_busy(pcm_addr_t a);
    return pend.exists(int'(a)) && pend[int'(a)] > 0;
  endfunction
  function automatic void fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
  endfunction

  // ---- request generation (driven on the falling edge) ----
  task automatic make_req(output bit ok);
    pcm_addr_t a;
    logic [1:0] t;
    ok = 1'b0;
    t = 2'($urandom_range(0, NUM_THREADS - 1));
    for (int tries = 0; tries < 8 && !ok; tries++) begin
      if ($urandom_range(0, 1) == 0 && sent > 0) begin
        a = last_a[t];
        a.line = 2'($urandom);
      end else begin
        a = '0;
        a.bank    = BANK_W'($urandom_range(0, NB - 1));
        a.arr_row = 3'($urandom);
        a.arr_col = 3'($urandom);
        a.row     = ROW_W'($urandom_range(0, NROWS - 1));
        a.seg     = 3'($urandom_range(0, 1));
        a.line    = 2'($urandom);
      end
      if (!line_busy(a)) ok = 1'b1;
    end
    if (!ok || id_busy[next_id]) begin ok = 1'b0; return; end
    req = '0;
    req.id = next_id; req.tid = t; req.addr = a;
    req.we = ($urandom_range(0, 99) >= RD_PCT);
    if (req.we) begin
      logic [LINE_BITS-1:0] d;
      int mode;
      d = current(a);
      mode = $urandom_range(0, 19);
      if (mode < 5) d = ~d ^ LINE_BITS'($urandom);             // mostly inverted
      else if (mode < 19) begin                               // a few segments
        int ns;
        ns = $urandom_range(1, 3);
        for (int k = 0; k < ns; k++) begin
          int s, nb;
          s = $urandom_range(0, NUM_SEGS - 1);
          nb = $urandom_range(1, 12);
          for (int j = 0; j < nb; j++) d[s*SEG_BITS + $urandom_range(0, SEG_BITS - 1)] ^= 1'b1;
        end
      end
      req.wdata = d;                                          // mode 19: unchanged
    end
    ok = 1'b1;
  endtask

  bit accepted;
  always @(negedge clk) if (rst_n) begin
    if (!req_valid || accepted) begin
      bit ok;
      req_valid = 1'b0;
      if (sent < NREQ) begin
        make_req(ok);
        req_valid = ok;
      end
    end
  end

  // ---- monitor (rising edge) ----
  always @(posedge clk) if (rst_n) begin
    cycle++;
    accepted = req_valid && req_ready;
    if (accepted) begin
      sent++;
      last_a[req.tid] = req.addr;
      if (pend.exists(int'(req.addr))) pend[int'(req.addr)]++;
      else pend[int'(req.addr)] = 1;
      if (req.we) ref_mem[int'(req.addr)] = req.wdata;
      else begin
        exp_rd[req.id] = current(req.addr);
        rd_addr_of[req.id] = req.addr;
        id_busy[req.id] = 1'b1;
      end
      next_id = next_id + 1'b1;
    end
    if (resp_valid) begin
      checks++; answered++;
      if (!id_busy[resp.id]) fail($sformatf("response for id %0d, which has no read", resp.id));
      else begin
        if (resp.data !== exp_rd[resp.id]) fail($sformatf("read data of id %0d", resp.id));
        pend[int'(rd_addr_of[resp.id])]--;
        id_busy[resp.id] = 1'b0;
      end
    end
    for (int b = 0; b < NB; b++) begin
      for (int h = 0; h < 2; h++) begin
        if (arr_rd_en[b][h]) begin
          pcm_addr_t a;
          a = arr_rd_addr[b][h];
          checks++;
          if (32'(a.bank) != b || 32'(a.arr_col[2]) != h) fail("cell read on the wrong port");
          if (!lwl_o[b][32'(a.arr_row)*8 + 32'(a.arr_col)][a.row])
            fail("cell read without its local wordline");
        end
        if (arr_wr_en[b][h]) begin
          pcm_addr_t a;
          a = arr_wr_addr[b][h];
          checks++; committed++;
          if (!lwl_o[b][32'(a.arr_row)*8 + 32'(a.arr_col)][a.row])
            fail("cell write without its local wordline");
          if (!line_busy(a)) fail("cell write to a line with no write outstanding");
          else pend[int'(a)]--;
          if (plain(arr_wr_data[b][h]) !== ref_mem[int'(a)]) fail("cell write data");
          if (arr_wr_data[b][h].flip != '0) mech[15]++;
        end
      end
      if (ev_o[b].grp_formed)  mech[0]++;
      if (ev_o[b].fallback)    mech[1]++;
      if (ev_o[b].iss_rd_hit)  mech[2]++;
      if (ev_o[b].iss_rd_miss) mech[3]++;
      if (ev_o[b].iss_wr_hit)  mech[4]++;
      if (ev_o[b].iss_wr_miss) mech[5]++;
      if (ev_o[b].rd_insert)   mech[6]++;
      if (ev_o[b].ww_par)      mech[7]++;
      if (ev_o[b].rw_par)      mech[8]++;
      if (ev_o[b].rr_par)      mech[9]++;
      if (ev_o[b].dec_stall)   mech[10]++;
      if (ev_o[b].col_stall)   mech[11]++;
      if (ev_o[b].round_skip)  mech[12]++;
    end
    if (budget_stall) mech[13]++;
    mech[14] = int'(batch_count);
  end

  function automatic int outstanding();
    int n = 0;
    foreach (pend[k]) n += pend[k];
    return n;
  endfunction

  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req = '0; next_id = '0; accepted = 1'b0;
    for (int i = 0; i < 256; i++) begin id_busy[i] = 1'b0; exp_rd[i] = '0; rd_addr_of[i] = '0; end
    for (int t = 0; t < NUM_THREADS; t++) last_a[t] = '0;
    for (int m = 0; m < NMECH; m++) mech[m] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (sent == NREQ);
    while (outstanding() != 0 && cycle < MAXCYC) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (outstanding() != 0) fail($sformatf("%0d requests never completed", outstanding()));
    foreach (ref_mem[k]) begin
      checks++;
      if (plain(u_cells.peek(pcm_addr_t'(k))) !== ref_mem[k]) fail("line does not hold its last write");
    end
    for (int m = 0; m < NMECH; m++) begin
      $display("INFO %-20s %0d", MNAME[m], mech[m]);
      if (REQUIRE[m]) begin
        checks++;
        if (mech[m] == 0) fail($sformatf("mechanism never seen: %s", MNAME[m]));
      end
    end
    $display("INFO %0d requests, %0d read responses, %0d cell writes, %0d cycles",
             sent, answered, committed, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    while (cycle < MAXCYC + 1000) @(posedge clk);
    fail("watchdog: the run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
