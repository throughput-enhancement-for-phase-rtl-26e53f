// tb_v_ctrl: the V line is claimed by the command that rises while (one
// cycle after) the V decoder selects the column, held while that command is
// high, and not disturbed by the other command or by later decoder outputs.
module tb_v_ctrl;
  logic clk = 0, rst_n = 0, vout = 0, w = 0, r = 0, v;
  int checks = 0, failures = 0;
  v_ctrl dut (.clk, .rst_n, .vout, .w, .r, .v);
  always #5 clk = ~clk;
  task automatic step(input logic vo, input logic ww, input logic rr, input logic exp,
                      input string what);
    vout = vo; w = ww; r = rr;
    #1; checks++;
    if (v !== exp) begin failures++; $display("FAIL %s: v=%b exp=%b", what, v, exp); end
    @(posedge clk); #1;
  endtask
  initial begin
    @(posedge clk); #1 rst_n = 1;
    // write claims the column
    step(1, 0, 0, 0, "decoder output alone");
    step(1, 1, 0, 1, "W rises: V high");
    step(0, 1, 0, 1, "decoder released: V held by W");
    step(0, 1, 1, 1, "R rises for another column: V unchanged");
    step(0, 1, 0, 1, "R falls: V unchanged");
    step(1, 1, 0, 1, "decoder selects again, no effect");
    step(0, 0, 0, 0, "W falls: V falls");
    // write already running elsewhere: a later decoder select is ignored by W
    step(0, 1, 0, 0, "W of another column");
    step(1, 1, 0, 0, "decoder selects this column while W already high");
    step(1, 1, 1, 1, "R rises: column claimed by R");
    step(0, 0, 1, 1, "W falls: V still held by R");
    step(0, 0, 0, 0, "R falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
