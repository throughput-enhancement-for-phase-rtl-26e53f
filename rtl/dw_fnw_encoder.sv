// dw_fnw_encoder: differential write with Flip-N-Write for one 512-bit line.
//
// Differential write compares the line already in the cells (read before the
// write) with the new data and writes only the bits that differ, so the
// number of differing bits is the power a write really needs. Flip-N-Write
// may in addition store a 64-bit segment inverted, with a flag bit, when that
// flips fewer cells. For each segment this block picks the stored form
// (plain or inverted) that changes fewer cells, counting a change of the flag
// cell too, and reports per segment how many cells change. With FNW = 0 the
// data are always stored plain (differential write alone).
// Combinational. Segment-wise flip flags and counting the flag cell are this
// design's choices; the document names the two techniques and uses their
// bit-change counts.
module dw_fnw_encoder
  import pcm_pkg::*;
#(
  parameter bit FNW = 1'b1
) (
  input  cell_word_t            old_word,   // what the cells hold now
  input  logic [LINE_BITS-1:0]  new_data,   // data to be written
  output cell_word_t            new_word,   // what the cells will hold
  output logic [SEGC_W-1:0]     seg_chg [NUM_SEGS]
);
  always_comb begin
    for (int s = 0; s < NUM_SEGS; s++) begin
      logic [SEG_BITS-1:0] o, d;
      logic [SEGC_W-1:0]   c_plain, c_inv;
      o = old_word.data[s*SEG_BITS +: SEG_BITS];
      d = new_data[s*SEG_BITS +: SEG_BITS];
      c_plain = SEGC_W'($countones(o ^ d))  + SEGC_W'(old_word.flip[s]);
      c_inv   = SEGC_W'($countones(o ^ ~d)) + SEGC_W'(!old_word.flip[s]);
      if (FNW && c_inv < c_plain) begin
        new_word.flip[s] = 1'b1;
        new_word.data[s*SEG_BITS +: SEG_BITS] = ~d;
        seg_chg[s] = c_inv;
      end else begin
        new_word.flip[s] = 1'b0;
        new_word.data[s*SEG_BITS +: SEG_BITS] = d;
        seg_chg[s] = c_plain;
      end
    end
  end
endmodule
