// up_down_counter -- saturating up/down counter with clear and load.
//
// Cell 0 of the sorter keeps a status counter: it counts up on every accepted
// push, down on every accepted pop, and is loaded on a parallel load, so
// zero_o and max_o give the empty and full status of the array. A second
// instance counts the exchange phases of a sort. Priority: clear, load, then
// counting; up and down together cancel. The count saturates at 0 and MAX.
// Synchronous, one clock per step, asynchronous active-low reset to 0.
module up_down_counter #(
  parameter int unsigned W   = 4,
  parameter int unsigned MAX = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr_i,
  input  logic         load_i,
  input  logic [W-1:0] value_i,
  input  logic         up_i,
  input  logic         down_i,
  output logic [W-1:0] count_o,
  output logic         zero_o,
  output logic         max_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           count_o <= '0;
    else if (clr_i)                       count_o <= '0;
    else if (load_i)                      count_o <= value_i;
    else if (up_i && !down_i && !max_o)   count_o <= count_o + 1'b1;
    else if (down_i && !up_i && !zero_o)  count_o <= count_o - 1'b1;
  end

  assign zero_o = (count_o == '0);
  assign max_o  = (count_o == W'(MAX));

endmodule
