// lwl_driver: the local wordline drivers of one cell array (one per local
// wordline, ROWS per array).
//
// While the array enable EN is low the pass gates of the drivers are open and
// the drivers follow the global wordlines, but drive no local wordline.
// When EN rises the pass gates close: the global wordline that was high is
// kept inside the driver and its local wordline is raised. The row decoder and
// the global wordlines are then free for another access, and the local
// wordline stays high until EN falls at the end of the operation.
//
// Interface: the global wordlines of an array row are carried as the number of
// the one raised line (gwl_row) and a flag that one is raised (gwl_on); the
// outputs are the ROWS local wordlines, one-hot or all low. Cycle-level model
// of the pass-gate latch, as in array_en_latch: the drivers take the live GWL
// while EN is low and the stored one while EN is high.
// The behaviour follows the document. Storing the number of the raised line
// (log2(ROWS)+1 bits) rather than ROWS separate latch bits is this design's
// choice; it holds the same information because at most one GWL is high.
module lwl_driver #(
  parameter int ROWS = pcm_pkg::ROWS_PER_ARRAY,
  parameter int RW   = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,       // array enable from array_en_latch
  input  logic            gwl_on,   // one global wordline of this array row is high
  input  logic [RW-1:0]   gwl_row,  // ... and this is its number
  output logic [ROWS-1:0] lwl       // local wordlines
);
  logic          on_reg, on;
  logic [RW-1:0] row_reg, row;
  assign on  = en ? on_reg  : gwl_on;
  assign row = en ? row_reg : gwl_row;
  assign lwl = (en && on) ? ROWS'(1) << row : '0;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin on_reg <= 1'b0; row_reg <= '0; end
    else        begin on_reg <= on;   row_reg <= row; end
endmodule
