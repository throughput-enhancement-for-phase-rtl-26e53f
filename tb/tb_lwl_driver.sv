// tb_lwl_driver: local wordline drivers latch the global wordline when EN
// rises and hold it while the global wordlines change.
module tb_lwl_driver;
  localparam int ROWS = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [ROWS-1:0] gwl = '0, lwl;
  logic [$clog2(ROWS)-1:0] gwl_row;
  logic gwl_on;
  // the one-hot GWL pattern of the stimulus, as carried to the drivers
  always_comb begin
    gwl_on = |gwl; gwl_row = '0;
    for (int i = 0; i < ROWS; i++) if (gwl[i]) gwl_row = $clog2(ROWS)'(i);
  end
  int checks = 0, failures = 0;
  lwl_driver #(.ROWS(ROWS)) dut (.clk, .rst_n, .en, .gwl_on, .gwl_row, .lwl);
  always #5 clk = ~clk;
  task automatic step(input logic e, input logic [ROWS-1:0] g, input logic [ROWS-1:0] exp,
                      input string what);
    en = e; gwl = g;
    #1; checks++;
    if (lwl !== exp) begin failures++; $display("FAIL %s: lwl=%h exp=%h", what, lwl, exp); end
    @(posedge clk); #1;
  endtask
  initial begin
    @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < ROWS; r += 5) begin
      logic [ROWS-1:0] oh, other;
      oh = ROWS'(1) << r; other = ROWS'(1) << ((r + 3) % ROWS);
      step(0, oh, '0, "GWL alone drives no LWL");
      step(1, oh, oh, "EN rises: LWL of the selected row");
      step(1, '0, oh, "GWL released, LWL held");
      step(1, other, oh, "another GWL does not disturb");
      step(0, other, '0, "EN falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
