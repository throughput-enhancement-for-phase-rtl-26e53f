// v_ctrl: the V-line control of one array column (8 per bank).
//
// Each half bank has one write command line W and one read command line R
// that run past its four V_ctrl cells. A V_ctrl has one side for W and one for
// R, built symmetrically. Each side has a latch that is open while its
// command is low and samples the V decoder output `vout`; when the command
// rises the latch closes. So a column whose decoder output was high in the
// cycle before the command rises is claimed by that command, and the V line
// then stays high for as long as the command stays high, whatever the V
// decoder does afterwards. The decoder is thus free for the next access.
// Cross control: a side may not claim the column while the other side holds
// it, so a held column is not disturbed by the other command line. (Two
// accesses in one column share the global bitlines and are never allowed;
// the assertion flags an attempt.)
//
// Cycle-level latch model as in array_en_latch. Behaviour is the document's
// (Fig. 7 and its description); the modelling granularity is this design's.
module v_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic vout,   // output of the array V decoder for this column
  input  logic w,      // write command of this half
  input  logic r,      // read command of this half
  output logic v       // V line of the column
);
  logic wq_reg, rq_reg, wq, rq, w_hold, r_hold, w_hold_q, r_hold_q;

  assign wq = w ? wq_reg : (vout & ~r_hold_q);
  assign rq = r ? rq_reg : (vout & ~w_hold_q);
  assign w_hold = w & wq;
  assign r_hold = r & rq;
  assign v = w_hold | r_hold;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wq_reg <= 1'b0; rq_reg <= 1'b0; w_hold_q <= 1'b0; r_hold_q <= 1'b0;
    end else begin
      wq_reg <= wq; rq_reg <= rq; w_hold_q <= w_hold; r_hold_q <= r_hold;
    end

  // A column is held by one command at a time.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) !(w_hold && r_hold));
endmodule
