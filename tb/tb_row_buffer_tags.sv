// tb_row_buffer_tags: random accesses over a small tag space, compared with
// an LRU list kept in the testbench.
module tb_row_buffer_tags;
  import pcm_pkg::*;
  localparam int NL = 4;
  logic clk = 0, rst_n = 0;
  logic [TAG_W-1:0] look_tag [NL];
  logic [NL-1:0] look_hit;
  logic upd_en = 0;
  logic [TAG_W-1:0] upd_tag = '0;
  int checks = 0, failures = 0, hits = 0;
  logic [TAG_W-1:0] lru [$];

  row_buffer_tags #(.ENTRIES(8), .NLOOK(NL)) dut (.clk, .rst_n, .look_tag, .look_hit,
                                                  .upd_en, .upd_tag);
  always #5 clk = ~clk;

  function automatic bit in_list(logic [TAG_W-1:0] t);
    foreach (lru[i]) if (lru[i] == t) return 1;
    return 0;
  endfunction

  initial begin
    for (int l = 0; l < NL; l++) look_tag[l] = '0;
    @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      for (int l = 0; l < NL; l++) look_tag[l] = TAG_W'($urandom_range(0, 13)) << 3;
      upd_en  = ($urandom_range(0, 3) != 0);
      upd_tag = TAG_W'($urandom_range(0, 13)) << 3;
      #1;
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (look_hit[l] !== in_list(look_tag[l])) begin
          failures++; $display("FAIL it %0d tag %h hit=%b", it, look_tag[l], look_hit[l]);
        end
        if (look_hit[l]) hits++;
      end
      @(posedge clk); #1;
      if (upd_en) begin
        foreach (lru[i]) if (lru[i] == upd_tag) begin lru.delete(i); break; end
        lru.push_front(upd_tag);
        if (lru.size() > 8) void'(lru.pop_back());
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no hits seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
