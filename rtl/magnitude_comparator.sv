// magnitude_comparator -- unsigned comparator of two information words.
//
// Compares the information bits of the two neighbouring cells of a control
// unit (the "CS" circuit of the storage-checking scheme). Words are unsigned
// integers (the document does not give a number format). Written as a
// most-significant-bit-first scan: the first bit position where the operands
// differ decides. Combinational.
module magnitude_comparator #(
  parameter int unsigned DATA_W = sorter_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] a_i,
  input  logic [DATA_W-1:0] b_i,
  output logic              gt_o,   // a_i > b_i
  output logic              lt_o    // a_i < b_i
);

  always_comb begin
    logic decided;
    gt_o    = 1'b0;
    lt_o    = 1'b0;
    decided = 1'b0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      if (!decided && (a_i[i] != b_i[i])) begin
        gt_o    = a_i[i];
        lt_o    = b_i[i];
        decided = 1'b1;
      end
    end
  end

endmodule
