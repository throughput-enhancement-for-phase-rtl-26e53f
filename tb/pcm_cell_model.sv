// pcm_cell_model: behavioural stand-in for the PCM cell arrays, sense
// amplifiers and write drivers, for simulation only.
// NP read ports and NP write ports (one per half bank in use) plus one port
// for the pre-write read. A read returns the stored cell word one clock after
// its enable; a write stores the cell word at the clock edge. Lines never
// written hold a fixed pattern derived from the address, so that writes have
// realistic, non-zero bit changes.
module pcm_cell_model
  import pcm_pkg::*;
#(
  parameter int NP = 2
) (
  input  logic          clk,
  input  logic [NP-1:0] rd_en,
  input  pcm_addr_t     rd_addr [NP],
  output cell_word_t    rd_data [NP],
  input  logic [NP-1:0] wr_en,
  input  pcm_addr_t     wr_addr [NP],
  input  cell_word_t    wr_data [NP],
  input  logic          pw_en,
  input  pcm_addr_t     pw_addr,
  output cell_word_t    pw_data
);
  cell_word_t mem [int];

  function automatic cell_word_t initial_word(pcm_addr_t a);
    cell_word_t w;
    for (int i = 0; i < LINE_BITS / 32; i++)
      w.data[i*32 +: 32] = (32'(a) + 32'(i)) * 32'h9e3779b1;
    w.flip = '0;
    return w;
  endfunction

  function automatic cell_word_t peek(pcm_addr_t a);
    if (mem.exists(int'(a))) return mem[int'(a)];
    return initial_word(a);
  endfunction

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) if (rd_en[p]) rd_data[p] <= peek(rd_addr[p]);
    if (pw_en) pw_data <= peek(pw_addr);
    for (int p = 0; p < NP; p++) if (wr_en[p]) mem[int'(wr_addr[p])] = wr_data[p];
  end
endmodule
