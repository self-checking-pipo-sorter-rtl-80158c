// berger_tsc_checker -- totally self-checking checker for a Berger codeword.
//
// The codeword is {data, chk}: DATA_W information bits and CHK_W check bits
// holding the count of 0s in the information bits. The checker counts the 1s
// of the information bits; for a maximal-length code (DATA_W = 2**CHK_W - 1)
// the count of 1s of a valid codeword is the bitwise complement of the stored
// count of 0s. Each stored check bit and the matching bit of the count of 1s
// form a two-rail pair, and a two-rail checker tree reduces the CHK_W pairs
// to one. A valid codeword gives rail_o = 01 or 10; any unidirectional error
// in data or check bits gives 00 or 11, and err_o = 1.
//
// The document asks for totally self-checking checkers and gives no inner
// structure; this complement-generator plus two-rail-tree arrangement is the
// usual one and is this design's choice. Combinational.
module berger_tsc_checker #(
  parameter int unsigned DATA_W = sorter_pkg::DATA_W,
  parameter int unsigned CHK_W  = sorter_pkg::CHK_W
) (
  input  logic [DATA_W+CHK_W-1:0] cw_i,
  output sorter_pkg::rail_t       rail_o,
  output logic                    err_o
);

  if (DATA_W != (2**CHK_W) - 1) begin : g_bad_size
    $error("berger_tsc_checker needs DATA_W = 2**CHK_W - 1");
  end

  logic [DATA_W-1:0] data;
  logic [CHK_W-1:0]  chk;
  logic [CHK_W-1:0]  ones;

  assign data = cw_i[DATA_W+CHK_W-1:CHK_W];
  assign chk  = cw_i[CHK_W-1:0];

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < DATA_W; i++)
      ones = ones + CHK_W'(data[i]);
  end

  two_rail_checker #(.NPAIRS(CHK_W)) u_tree (
    .x1_i  (chk),
    .x0_i  (ones),
    .rail_o(rail_o)
  );

  assign err_o = ~(rail_o.r1 ^ rail_o.r0);

endmodule
