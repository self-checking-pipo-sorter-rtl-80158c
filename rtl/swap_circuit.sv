// swap_circuit -- exchanges two codewords.
//
// With swap_i = 1 the codeword of cell i goes to cell i+1 and the other way
// round; with swap_i = 0 both pass straight. Information and check bits move
// together, so the processing checkers behind it see whole codewords.
// Combinational.
module swap_circuit #(
  parameter int unsigned DATA_W = sorter_pkg::DATA_W,
  parameter int unsigned CHK_W  = sorter_pkg::CHK_W,
  localparam int unsigned CW_W  = DATA_W + CHK_W
) (
  input  logic            swap_i,
  input  logic [CW_W-1:0] a_i,    // codeword of cell i
  input  logic [CW_W-1:0] b_i,    // codeword of cell i+1
  output logic [CW_W-1:0] lo_o,   // new codeword of cell i
  output logic [CW_W-1:0] hi_o    // new codeword of cell i+1
);

  assign lo_o = swap_i ? b_i : a_i;
  assign hi_o = swap_i ? a_i : b_i;

endmodule
