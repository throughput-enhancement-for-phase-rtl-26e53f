// tb_power_budget_mgr: four write slots issue random writes against a small
// budget. Checked: every grant's cell word decodes to the request data; its
// demand and round count match the cells it really changes in the chosen
// configuration; the granted demands never exceed the budget; a grant never
// comes before the configuration penalty; every request is granted; a write
// had to wait for budget at least once.
module tb_power_budget_mgr;
  import pcm_pkg::*;
  localparam int NREQ = 4, BUDGET = 100, T_PEN = 5, T_SET = 8, T_RND = 4;
  logic clk = 0, rst_n = 0;
  logic [NREQ-1:0] req_valid = '0, req_ack, grant, done = '0;
  pcm_addr_t req_addr [NREQ];
  logic [LINE_BITS-1:0] req_data [NREQ];
  logic pw_rd_en, stall;
  pcm_addr_t pw_rd_addr;
  cell_word_t pw_rd_data, grant_word;
  wr_cfg_t grant_cfg;
  logic [DEM_W-1:0] avail;
  int checks = 0, failures = 0, grants = 0, stalls = 0, cycle = 0;
  cell_word_t mem [int];

  power_budget_mgr #(.NREQ(NREQ), .BUDGET(BUDGET), .DCAP(64), .FNW(1'b1), .T_PEN(T_PEN),
                     .T_SET(T_SET), .T_RND(T_RND)) dut (
    .clk, .rst_n, .req_valid, .req_addr, .req_data, .req_ack, .pw_rd_en, .pw_rd_addr,
    .pw_rd_data, .grant, .grant_cfg, .grant_word, .done, .avail, .ev_budget_stall(stall));

  always #5 clk = ~clk;

  function automatic cell_word_t cell_of(pcm_addr_t a);
    cell_word_t w;
    if (mem.exists(int'(a))) return mem[int'(a)];
    for (int i = 0; i < LINE_BITS / 32; i++) w.data[i*32 +: 32] = 32'(a) * 32'h9e3779b1 + 32'(i);
    w.flip = '0;
    return w;
  endfunction

  always_ff @(posedge clk) if (pw_rd_en) pw_rd_data <= cell_of(pw_rd_addr);

  // per slot bookkeeping
  int ack_cyc [NREQ], left [NREQ], used [NREQ];
  bit waiting [NREQ], running [NREQ];
  cell_word_t oldw [NREQ];
  int issued = 0;

  always @(posedge clk) if (rst_n) begin
    int sum;
    cycle++;
    if (stall) stalls++;
    for (int r = 0; r < NREQ; r++) begin
      if (req_ack[r]) begin
        req_valid[r] <= 1'b0; waiting[r] = 1; ack_cyc[r] = cycle; oldw[r] = cell_of(req_addr[r]);
      end
      if (grant[r]) begin
        int per, dem, nr;
        grants++;
        checks++;
        if (!waiting[r]) begin failures++; $display("FAIL unexpected grant %0d", r); end
        checks++;
        if (cycle - ack_cyc[r] < T_PEN) begin failures++; $display("FAIL grant before penalty"); end
        for (int s = 0; s < NUM_SEGS; s++) begin
          checks++;
          if ((grant_word.data[s*64 +: 64] ^ {64{grant_word.flip[s]}}) !== req_data[r][s*64 +: 64]) begin
            failures++; $display("FAIL grant word does not decode");
          end
        end
        per = 1 << grant_cfg.cfg; dem = 0; nr = 0;
        for (int j = 0; j < 8 / per; j++) begin
          int sm;
          sm = 0;
          for (int s = j*per; s < (j+1)*per; s++) begin
            for (int b = 0; b < 64; b++) if (grant_word.data[s*64+b] != oldw[r].data[s*64+b]) sm++;
            if (grant_word.flip[s] != oldw[r].flip[s]) sm++;
          end
          if (sm > dem) dem = sm;
          if (sm > 0) nr++;
        end
        checks++;
        if (dem != int'(grant_cfg.demand) || nr != int'(grant_cfg.nrounds)) begin
          failures++; $display("FAIL cfg %0d demand %0d/%0d rounds %0d/%0d", grant_cfg.cfg, grant_cfg.demand, dem,
                               grant_cfg.nrounds, nr);
        end
        waiting[r] = 0; running[r] = 1; used[r] = dem;
        left[r] = T_SET + nr * T_RND;
        mem[int'(req_addr[r])] = grant_word;
      end
    end
    sum = 0;
    for (int r = 0; r < NREQ; r++) if (running[r]) sum += used[r];
    checks++;
    if (sum > BUDGET) begin failures++; $display("FAIL budget exceeded: %0d", sum); end
    for (int r = 0; r < NREQ; r++) begin
      done[r] <= 1'b0;
      if (running[r] && !grant[r]) begin
        left[r]--;
        if (left[r] <= 0) begin done[r] <= 1'b1; running[r] = 0; end
      end
      if (!running[r] && !waiting[r] && !req_valid[r] && !req_ack[r] && !done[r] && issued < 120
          && $urandom_range(0, 3) == 0) begin
        pcm_addr_t a;
        cell_word_t o;
        a = pcm_addr_t'(r * 64 + $urandom_range(0, 15));  // one slot per address range
        o = cell_of(a);
        req_addr[r] <= a;
        // new data: decoded old data with a random amount of change
        for (int s = 0; s < NUM_SEGS; s++) begin
          logic [63:0] m;
          m = ($urandom_range(0, 1)) ? {$urandom, $urandom} : 64'(1) << $urandom_range(0, 63);
          if ($urandom_range(0, 2) == 0) m = '0;
          req_data[r][s*64 +: 64] <= (o.data[s*64 +: 64] ^ {64{o.flip[s]}}) ^ m;
        end
        req_valid[r] <= 1'b1;
        issued++;
      end
    end
  end

  initial begin
    for (int r = 0; r < NREQ; r++) begin req_addr[r] = '0; req_data[r] = '0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    wait (issued == 120);
    repeat (400) @(posedge clk);
    checks++;
    if (grants != 120) begin failures++; $display("FAIL %0d of 120 writes granted", grants); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no write ever waited for budget"); end
    $display("INFO grants=%0d stall cycles=%0d", grants, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
