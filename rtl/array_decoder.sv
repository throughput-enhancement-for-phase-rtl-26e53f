// array_decoder: the 3:8 decoder used twice per bank, once as the array H
// decoder (which array row) and once as the array V decoder (which array
// column). The 8 x 8 grid of arrays is located by one H line and one V line,
// so two 3:8 decoders suffice. The output is one-hot while `en` is high and
// all-zero otherwise; purely combinational.
module array_decoder #(
  parameter int N_IN = 3
) (
  input  logic                 en,
  input  logic [N_IN-1:0]      sel,
  output logic [(1<<N_IN)-1:0] out
);
  always_comb begin
    out = '0;
    if (en) out[sel] = 1'b1;
  end
endmodule
