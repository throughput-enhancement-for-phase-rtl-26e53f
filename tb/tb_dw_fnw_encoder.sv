// tb_dw_fnw_encoder: random lines with few or many changed bits; the encoded
// word must decode to the new data, the counts must equal the cells that
// really change, and with Flip-N-Write no segment may change more cells than
// the plain form would.
module tb_dw_fnw_encoder;
  import pcm_pkg::*;
  cell_word_t old_word, nw_f, nw_p;
  logic [LINE_BITS-1:0] new_data;
  logic [SEGC_W-1:0] chg_f [NUM_SEGS], chg_p [NUM_SEGS];
  int checks = 0, failures = 0, flips = 0;

  dw_fnw_encoder #(.FNW(1'b1)) u_f (.old_word, .new_data, .new_word(nw_f), .seg_chg(chg_f));
  dw_fnw_encoder #(.FNW(1'b0)) u_p (.old_word, .new_data, .new_word(nw_p), .seg_chg(chg_p));

  function automatic int cells_changed(cell_word_t a, cell_word_t b, int s);
    int n = 0;
    for (int i = 0; i < SEG_BITS; i++) if (a.data[s*SEG_BITS+i] != b.data[s*SEG_BITS+i]) n++;
    if (a.flip[s] != b.flip[s]) n++;
    return n;
  endfunction

  initial begin
    for (int it = 0; it < 400; it++) begin
      for (int w = 0; w < LINE_BITS / 32; w++) old_word.data[w*32 +: 32] = $urandom;
      old_word.flip = (it % 2) ? 8'($urandom) : '0;
      // new data: the old plain value with a random number of flipped bits
      for (int s = 0; s < NUM_SEGS; s++) begin
        logic [SEG_BITS-1:0] plain, mask;
        int nflip;
        plain = old_word.data[s*SEG_BITS +: SEG_BITS] ^ {SEG_BITS{old_word.flip[s]}};
        nflip = (it % 3 == 0) ? $urandom_range(0, 64) : $urandom_range(0, 6);
        mask = '0;
        for (int k = 0; k < nflip; k++) mask[$urandom_range(0, 63)] = 1'b1;
        new_data[s*SEG_BITS +: SEG_BITS] = plain ^ mask;
      end
      #1;
      for (int s = 0; s < NUM_SEGS; s++) begin
        logic [SEG_BITS-1:0] dec;
        int cf, cp, ref_min, plain_cells;
        dec = nw_f.data[s*SEG_BITS +: SEG_BITS] ^ {SEG_BITS{nw_f.flip[s]}};
        checks++;
        if (dec !== new_data[s*SEG_BITS +: SEG_BITS]) begin failures++; $display("FAIL decode"); end
        cf = cells_changed(old_word, nw_f, s);
        cp = cells_changed(old_word, nw_p, s);
        checks++;
        if (int'(chg_f[s]) != cf) begin failures++; $display("FAIL fnw count %0d vs %0d", chg_f[s], cf); end
        checks++;
        if (int'(chg_p[s]) != cp) begin failures++; $display("FAIL dw count %0d vs %0d", chg_p[s], cp); end
        checks++;
        if (nw_p.flip[s] !== 1'b0 || nw_p.data[s*SEG_BITS +: SEG_BITS] !== new_data[s*SEG_BITS +: SEG_BITS]) begin
          failures++; $display("FAIL plain encoding");
        end
        // the better of the two stored forms
        plain_cells = 0;
        for (int i = 0; i < SEG_BITS; i++)
          if (old_word.data[s*SEG_BITS+i] != new_data[s*SEG_BITS+i]) plain_cells++;
        ref_min = plain_cells + (old_word.flip[s] ? 1 : 0);
        if (64 - plain_cells + (old_word.flip[s] ? 0 : 1) < ref_min)
          ref_min = 64 - plain_cells + (old_word.flip[s] ? 0 : 1);
        checks++;
        if (cf != ref_min) begin failures++; $display("FAIL not minimal %0d vs %0d", cf, ref_min); end
        if (nw_f.flip[s]) flips++;
      end
    end
    checks++;
    if (flips == 0) begin failures++; $display("FAIL no segment stored inverted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
