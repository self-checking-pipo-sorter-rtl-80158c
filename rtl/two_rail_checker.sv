// two_rail_checker -- totally self-checking two-rail checker tree.
//
// Reduces NPAIRS two-rail pairs (x1[i], x0[i]) to one pair. Each pair must be
// complementary when the checked circuit is fault free; the output is then
// complementary too (01 or 10). Any non-complementary input pair makes the
// output 00 or 11. The basic cell is the classic two-pair checker:
//   z1 = x1&y0 | x0&y1,  z0 = x1&y1 | x0&y0
// chained here one cell after another (a linear tree). Combinational.
module two_rail_checker #(
  parameter int unsigned NPAIRS = 4
) (
  input  logic [NPAIRS-1:0] x1_i,
  input  logic [NPAIRS-1:0] x0_i,
  output sorter_pkg::rail_t rail_o
);

  logic [NPAIRS-1:0] z1, z0;

  assign z1[0] = x1_i[0];
  assign z0[0] = x0_i[0];

  for (genvar i = 1; i < NPAIRS; i++) begin : g_cell
    assign z1[i] = (z1[i-1] & x0_i[i]) | (z0[i-1] & x1_i[i]);
    assign z0[i] = (z1[i-1] & x1_i[i]) | (z0[i-1] & x0_i[i]);
  end

  assign rail_o.r1 = z1[NPAIRS-1];
  assign rail_o.r0 = z0[NPAIRS-1];

endmodule
