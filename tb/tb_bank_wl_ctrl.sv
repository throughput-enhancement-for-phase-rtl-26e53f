// tb_bank_wl_ctrl: two writes and two reads opened one after the other
// through the shared decoders; each must keep its own array and local
// wordline while the decoders serve the next access, and each must close
// alone when its command falls.
module tb_bank_wl_ctrl;
  localparam int ROWS = 32;
  logic clk = 0, rst_n = 0;
  logic row_en = 0, col_en = 0;
  logic [2:0] arr_row = 0, arr_col = 0;
  logic [4:0] row = 0;
  logic [1:0] w_cmd = 0, r_cmd = 0;
  logic [7:0] h, v;
  logic [63:0] en;
  logic [ROWS-1:0] lwl [64];
  int checks = 0, failures = 0;

  bank_wl_ctrl #(.ROWS(ROWS)) dut (.clk, .rst_n, .row_en, .arr_row, .row, .col_en, .arr_col,
                                   .w_cmd, .r_cmd, .h, .v, .en, .lwl);
  always #5 clk = ~clk;

  // expected open accesses: array index -> row, -1 when closed
  int exp_row [64];

  task automatic check_all(input string what);
    logic [63:0] exp_en;
    exp_en = '0;
    for (int a = 0; a < 64; a++) if (exp_row[a] >= 0) exp_en[a] = 1'b1;
    checks++;
    if (en !== exp_en) begin failures++; $display("FAIL %s: en=%h exp=%h", what, en, exp_en); end
    for (int a = 0; a < 64; a++) begin
      logic [ROWS-1:0] e;
      e = (exp_row[a] >= 0) ? (ROWS'(1) << exp_row[a]) : '0;
      checks++;
      if (lwl[a] !== e) begin failures++; $display("FAIL %s: lwl[%0d]=%h exp=%h", what, a, lwl[a], e); end
    end
  endtask

  task automatic access(input int ar, input int r, input int ac, input bit is_w);
    @(posedge clk); #1;
    row_en = 1; arr_row = 3'(ar); row = 5'(r);
    #1 checks++;
    if (h !== (8'b1 << ar)) begin failures++; $display("FAIL H line %b", h); end
    @(posedge clk); #1;
    col_en = 1; arr_col = 3'(ac);
    @(posedge clk); #1;
    if (is_w) w_cmd[ac/4] = 1'b1; else r_cmd[ac/4] = 1'b1;
    #1 checks++;
    if (!v[ac]) begin failures++; $display("FAIL V line %0d not raised", ac); end
    @(posedge clk); #1;
    row_en = 0; col_en = 0; arr_row = 3'($urandom); row = 5'($urandom); arr_col = 3'($urandom);
    exp_row[ar*8+ac] = r;
    @(posedge clk); #1;
  endtask

  initial begin
    for (int a = 0; a < 64; a++) exp_row[a] = -1;
    @(posedge clk); #1 rst_n = 1;
    check_all("reset");
    access(2, 7, 1, 1);  check_all("left write open");
    access(5, 9, 3, 0);  check_all("left read beside write");
    access(0, 3, 6, 1);  check_all("right write");
    access(1, 4, 4, 0);  check_all("right read: 2 writes and 2 reads");
    r_cmd[0] = 0; exp_row[5*8+3] = -1; @(posedge clk); #1; check_all("left read done");
    access(7, 30, 2, 0); check_all("second left read");
    w_cmd[0] = 0; exp_row[2*8+1] = -1; @(posedge clk); #1; check_all("left write done");
    w_cmd[1] = 0; r_cmd = 0; exp_row[0*8+6] = -1; exp_row[1*8+4] = -1; exp_row[7*8+2] = -1;
    @(posedge clk); #1; check_all("all closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
