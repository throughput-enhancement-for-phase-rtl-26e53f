// tb_nb_bank: one bank runs the document's eight-request example
// (W1 R2 R3 R4 R5 W6 R7 R8; W1, R2, R4, R5, R8 in the left half, W1 and R5 in
// one array column, R3 and W6 in another) with RAWP. Power budgeting is
// replaced by a stub granting every write 8 rounds after a few cycles.
// Checked: all read data; local wordline of every access raised; the two
// writes overlap; reads run beside writes; R5 is inserted into the paused
// W1 (R3 is served before W6 starts); the whole sequence finishes well under
// the time two serial writes take; the written lines are stored; a read of a just-written row
// is a row-buffer hit with the short latency.
module tb_nb_bank;
  import pcm_pkg::*;
  localparam int ROWS = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  pcm_req_t in_req;
  logic new_batch = 0;
  logic [1:0] thread_rank [NUM_THREADS];
  logic [4:0] marked_cnt [NUM_THREADS];
  logic busy;
  logic [1:0] bpb_req, bpb_ack, bpb_grant, wr_done;
  pcm_addr_t bpb_addr [2];
  logic [LINE_BITS-1:0] bpb_data [2];
  wr_cfg_t grant_cfg;
  cell_word_t grant_word;
  logic [1:0] arr_rd_en, arr_wr_en, resp_valid, resp_ack;
  pcm_addr_t arr_rd_addr [2], arr_wr_addr [2];
  cell_word_t arr_rd_data [2], arr_wr_data [2], pw_data;
  pcm_resp_t resp [2];
  logic [7:0] h_o, v_o;
  logic [63:0] en_o;
  logic [ROWS-1:0] lwl_o [64];
  bank_ev_t ev;
  int checks = 0, failures = 0, cycle = 0;

  nb_bank #(.Q(8), .SCHED(SCHED_RAWP), .ROWS(ROWS)) dut (
    .clk, .rst_n, .in_valid, .in_req, .in_ready, .new_batch, .thread_rank, .marked_cnt, .busy,
    .bpb_req, .bpb_addr, .bpb_data, .bpb_ack, .bpb_grant, .grant_cfg, .grant_word, .wr_done,
    .arr_rd_en, .arr_rd_addr, .arr_rd_data, .arr_wr_en, .arr_wr_addr, .arr_wr_data,
    .resp_valid, .resp, .resp_ack, .h_o, .v_o, .en_o, .lwl_o, .ev);

  pcm_cell_model #(.NP(2)) u_cells (
    .clk, .rd_en(arr_rd_en), .rd_addr(arr_rd_addr), .rd_data(arr_rd_data), .wr_en(arr_wr_en),
    .wr_addr(arr_wr_addr), .wr_data(arr_wr_data), .pw_en(1'b0), .pw_addr('0), .pw_data(pw_data));

  always #5 clk = ~clk;
  assign resp_ack = resp_valid;

  // power budgeting stub: ack at once, grant 3 cycles later, 8 rounds
  int gcnt [2];
  bit gpend [2];
  always_comb begin
    bpb_ack = bpb_req;
    bpb_grant = '0;
    if (gpend[0] && gcnt[0] == 0) bpb_grant[0] = 1'b1;
    else if (gpend[1] && gcnt[1] == 0) bpb_grant[1] = 1'b1;
    grant_cfg = '{cfg: 2'd0, demand: 11'd8, nrounds: 4'd8};
    grant_word.flip = '0;
    grant_word.data = bpb_grant[0] ? bpb_data[0] : bpb_data[1];
  end
  always @(posedge clk) for (int h = 0; h < 2; h++) begin
    if (bpb_ack[h]) begin gpend[h] = 1; gcnt[h] = 3; end
    else if (bpb_grant[h]) gpend[h] = 0;
    else if (gpend[h] && gcnt[h] > 0) gcnt[h]--;
  end

  // expected read data per id
  logic [LINE_BITS-1:0] exp_data [256];
  int n_resp = 0, n_wdone = 0, last_cycle = 0, rd_issue_cyc [2], lat [256];
  int ww = 0, rw = 0, ins = 0, hits = 0, w1_done = 0, r5_cycle = 0;

  function automatic pcm_addr_t mk(int arr_row, int arr_col, int row, int line);
    pcm_addr_t a;
    a = '0; a.arr_row = 3'(arr_row); a.arr_col = 3'(arr_col); a.row = ROW_W'(row);
    a.line = 2'(line);
    return a;
  endfunction
  function automatic logic [LINE_BITS-1:0] plain(cell_word_t w);
    for (int s = 0; s < NUM_SEGS; s++)
      plain[s*64 +: 64] = w.data[s*64 +: 64] ^ {64{w.flip[s]}};
  endfunction

  task automatic send(input int id, input bit we, input pcm_addr_t a);
    @(negedge clk);
    in_req = '0; in_req.id = 8'(id); in_req.we = we; in_req.addr = a; in_req.tid = 2'(id % 4);
    for (int i = 0; i < LINE_BITS / 32; i++) in_req.wdata[i*32 +: 32] = $urandom;
    if (we) exp_data[id] = in_req.wdata;
    else exp_data[id] = plain(u_cells.peek(a));
    in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (ev.ww_par) ww++;
    if (ev.rw_par) rw++;
    if (ev.rd_insert) ins++;
    if (ev.iss_rd_hit) hits++;
    for (int h = 0; h < 2; h++) begin
      if (arr_rd_en[h]) begin
        checks++;
        rd_issue_cyc[h] = cycle;
        if (!lwl_o[arr_rd_addr[h].arr_row*8 + arr_rd_addr[h].arr_col][arr_rd_addr[h].row]) begin
          failures++; $display("FAIL read without its local wordline");
        end
      end
      if (arr_wr_en[h]) begin
        checks++;
        if (!lwl_o[arr_wr_addr[h].arr_row*8 + arr_wr_addr[h].arr_col][arr_wr_addr[h].row]) begin
          failures++; $display("FAIL write without its local wordline");
        end
      end
      if (wr_done[h]) begin
        n_wdone++; last_cycle = cycle;
        if (h == 0 && w1_done == 0) w1_done = cycle;
      end
      if (resp_valid[h]) begin
        n_resp++; last_cycle = cycle;
        lat[resp[h].id] = cycle - rd_issue_cyc[h];
        if (resp[h].id == 5) r5_cycle = cycle;
        checks++;
        if (resp[h].data !== exp_data[resp[h].id]) begin
          failures++; $display("FAIL read data of id %0d", resp[h].id);
        end
      end
    end
  end

  initial begin
    pcm_addr_t w1, w6;
    int start;
    for (int t = 0; t < NUM_THREADS; t++) thread_rank[t] = '0;
    in_req = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    w1 = mk(0, 0, 3, 0); w6 = mk(1, 4, 5, 0);
    start = cycle;
    send(1, 1, w1);              // W1 left, column 0
    send(2, 0, mk(2, 1, 1, 0));  // R2 left
    send(3, 0, mk(3, 4, 2, 0));  // R3 right, column 4 (as W6)
    send(4, 0, mk(4, 2, 7, 0));  // R4 left
    send(5, 0, mk(5, 0, 9, 0));  // R5 left, column 0 (as W1)
    send(6, 1, w6);              // W6 right, column 4
    send(7, 0, mk(6, 5, 4, 0));  // R7 right
    send(8, 0, mk(7, 3, 6, 0));  // R8 left
    new_batch = 1; @(posedge clk); #1 new_batch = 0;
    wait (n_resp == 6 && n_wdone == 2);
    repeat (5) @(posedge clk);
    $display("INFO sequence took %0d cycles (one write alone: %0d)", last_cycle - start,
             T_WR_SETUP + 8 * T_ROUND);
    checks++;
    if (last_cycle - start >= 2 * (T_WR_SETUP + 8 * T_ROUND)) begin
      failures++; $display("FAIL the two writes were not overlapped");
    end
    checks++; if (ww == 0) begin failures++; $display("FAIL no write-write overlap"); end
    checks++; if (rw == 0) begin failures++; $display("FAIL no read beside a write"); end
    // R5 shares W1's column: it can only finish before W1 if it was inserted
    checks++;
    if (ins == 0 || r5_cycle == 0 || r5_cycle > w1_done) begin
      failures++; $display("FAIL R5 not inserted into W1 (%0d insertions)", ins);
    end
    // written data are in the cells
    checks++;
    if (plain(u_cells.peek(w1)) !== exp_data[1] || plain(u_cells.peek(w6)) !== exp_data[6]) begin
      failures++; $display("FAIL written lines not stored");
    end
    // read back W1's line: the write allocated its row-buffer entry
    send(9, 0, w1);
    exp_data[9] = exp_data[1];
    send(10, 0, mk(0, 0, 11, 0));
    wait (n_resp == 8);
    repeat (2) @(posedge clk);
    checks++;
    // the response register adds one cycle to the array latency
    if (hits != 1 || lat[9] != T_RD_HIT + 1 || lat[10] != T_RD_MISS + 1) begin
      failures++; $display("FAIL row hit latency %0d / miss %0d", lat[9], lat[10]);
    end
    $display("INFO ww=%0d rw=%0d insertions=%0d hits=%0d", ww, rw, ins, hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
