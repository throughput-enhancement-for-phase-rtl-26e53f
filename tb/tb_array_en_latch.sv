// tb_array_en_latch: the array enable cell must capture H when V rises and
// ignore H while V stays high.
module tb_array_en_latch;
  logic clk = 0, rst_n = 0, h = 0, v = 0, en;
  int checks = 0, failures = 0;
  array_en_latch dut (.clk, .rst_n, .h, .v, .en);
  always #5 clk = ~clk;
  task automatic step(input logic hh, input logic vv, input logic exp, input string what);
    h = hh; v = vv;
    #1; checks++;
    if (en !== exp) begin failures++; $display("FAIL %s: en=%b exp=%b", what, en, exp); end
    @(posedge clk); #1;
  endtask
  initial begin
    @(posedge clk); #1 rst_n = 1;
    step(0, 0, 0, "idle");
    step(1, 0, 0, "H alone does not enable");
    step(1, 1, 1, "V rises with H high");
    step(0, 1, 1, "H released, EN held by V");
    step(0, 1, 1, "still held");
    step(0, 0, 0, "V falls");
    step(0, 1, 0, "V rises with H low");
    step(1, 1, 0, "H rises while V high: ignored");
    step(1, 0, 0, "V falls");
    step(1, 1, 1, "re-open");
    step(1, 0, 0, "close");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
