// bank_wl_ctrl: hierarchical wordline control of one non-blocking PCM bank.
//
// The bank is an 8 x 8 grid of cell arrays. One row decoder and one array H
// decoder sit in the middle of the bank and serve both halves; one array V
// decoder serves all eight array columns. Every array has an enable cell
// (array_en_latch) and a set of local wordline drivers (lwl_driver); every
// array column has a V_ctrl cell. The result is that after an access has
// opened its array, the decoders can be handed to the next access while the
// first one keeps its local wordline, so a half bank can run one read and one
// write at once, in different array columns.
//
// Access sequence (three cycles of decoder use, as in the timing graph of the
// document):
//   cycle 0  row_en: H line of arr_row and global wordline (arr_row,row) high
//   cycle 1  col_en as well: V decoder output of arr_col high
//   cycle 2  the half's W or R command rises: V_ctrl raises the V line, the
//            enable cell closes on H, EN rises, the LWL drivers close on GWL
//            and the local wordline rises
//   cycle 3+ row_en and col_en drop (decoders free); V, EN and LWL follow the
//            command until it falls.
// Interface: the cmd inputs are per half, index 0 = left (columns 0-3),
// 1 = right (columns 4-7). Outputs are indexed array = arr_row*8 + arr_col.
// Structure and sequence follow the document; the clocked modelling of the
// latches is this design's.
module bank_wl_ctrl #(
  parameter int ROWS = pcm_pkg::ROWS_PER_ARRAY
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    row_en,
  input  logic [2:0]              arr_row,
  input  logic [$clog2(ROWS)-1:0] row,
  input  logic                    col_en,
  input  logic [2:0]              arr_col,
  input  logic [1:0]              w_cmd,
  input  logic [1:0]              r_cmd,
  output logic [7:0]              h,
  output logic [7:0]              v,
  output logic [63:0]             en,
  output logic [ROWS-1:0]         lwl [64]
);
  logic [7:0]      vout;

  array_decoder u_hdec (.en(row_en), .sel(arr_row), .out(h));
  array_decoder u_vdec (.en(col_en), .sel(arr_col), .out(vout));

  // Row decoder: global wordline number `row` of the selected array row
  // (h[r]) is raised; see lwl_driver for how GWLs are carried.

  for (genvar c = 0; c < 8; c++) begin : g_col
    v_ctrl u_vctrl (.clk, .rst_n, .vout(vout[c]), .w(w_cmd[c/4]), .r(r_cmd[c/4]),
                    .v(v[c]));
    for (genvar r = 0; r < 8; r++) begin : g_row
      array_en_latch u_en (.clk, .rst_n, .h(h[r]), .v(v[c]), .en(en[r*8+c]));
      lwl_driver #(.ROWS(ROWS)) u_lwl (.clk, .rst_n, .en(en[r*8+c]), .gwl_on(h[r]),
                                       .gwl_row(row), .lwl(lwl[r*8+c]));
    end
  end

  // At most one open array per column: column-mates share global bitlines.
  for (genvar c = 0; c < 8; c++) begin : g_chk
    logic [7:0] col_en_v;
    for (genvar r = 0; r < 8; r++) begin : g_b
      assign col_en_v[r] = en[r*8+c];
    end
    a_one_per_col: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col_en_v));
  end
endmodule
