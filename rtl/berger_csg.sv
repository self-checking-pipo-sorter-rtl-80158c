// berger_csg -- Berger check symbol generator.
//
// Produces the check symbol of a Berger codeword: the binary count of the 0s
// among the DATA_W information bits. It is used wherever a new word enters the
// sorter (push and parallel load), so that the check symbol is stored together
// with the word. The count is a plain population count of the inverted word;
// the adder structure is this design's choice.
//
// Purely combinational. CHK_W must be able to hold DATA_W.
module berger_csg #(
  parameter int unsigned DATA_W = sorter_pkg::DATA_W,
  parameter int unsigned CHK_W  = sorter_pkg::CHK_W
) (
  input  logic [DATA_W-1:0] data_i,
  output logic [CHK_W-1:0]  chk_o
);

  always_comb begin
    chk_o = '0;
    for (int unsigned i = 0; i < DATA_W; i++)
      chk_o = chk_o + CHK_W'(!data_i[i]);
  end

endmodule
