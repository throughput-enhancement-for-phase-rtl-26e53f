// tb_array_decoder: exhaustive check of the 3:8 array decoder.
module tb_array_decoder;
  logic       en;
  logic [2:0] sel;
  logic [7:0] out;
  int checks = 0, failures = 0;
  array_decoder dut (.en, .sel, .out);
  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < 8; s++) begin
        en = 1'(e); sel = 3'(s);
        #1;
        checks++;
        if (out !== (e ? (8'b1 << s) : 8'h00)) begin
          failures++; $display("FAIL en=%0d sel=%0d out=%b", e, s, out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
