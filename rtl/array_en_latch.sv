// array_en_latch: the array selection cell that sits where an H line crosses
// a V line (one per array, 64 per bank).
//
// While the V line of its column is low the cell is transparent to its H line.
// When V rises it closes and keeps the H value it last saw, so the H decoder
// may move on to another access. EN = V and the kept H value: the selected
// array of the column is enabled, every other array of that column is held
// disabled and stops listening to H until V falls again.
//
// The transparent latch of the circuit is modelled at the controller clock:
// `q_reg` holds the value of the previous cycle and the output takes the live
// input while the latch is open, the stored one while it is closed. All
// inputs come from registers of the bank sequencer, so a latch opened or
// closed in a cycle sees a stable value. The latch is the document's; the
// cycle-level modelling is this design's.
module array_en_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic h,      // H line of this array row
  input  logic v,      // V line of this array column
  output logic en      // array enable
);
  logic q_reg, q;
  assign q  = v ? q_reg : h;
  assign en = v & q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q_reg <= 1'b0;
    else        q_reg <= q;
endmodule
