// sorter_cell -- one processing cell of the PIPO sorter.
//
// A cell stores one Berger codeword: register A (DATA_W information bits),
// register CSRA (CHK_W check bits), plus an occupied flag. Every clock it
// takes at most one new value, chosen by priority:
//   load_i   parallel load: load_data_i with its check symbol from the cell's
//            own generator; the cell becomes occupied;
//   push_i   shift up: the codeword and flag of the previous cell (for cell 0
//            the pushed word);
//   pop_i    shift down: the codeword and flag of the next cell (for the last
//            cell an empty slot);
//   wr_lo_i  compare-exchange result from the control unit on the right,
//            where this cell is the lower of the pair;
//   wr_hi_i  compare-exchange result from the control unit on the left,
//            where this cell is the upper of the pair.
// The main control unit never issues two of these in one cycle, and only one
// of wr_lo_i/wr_hi_i can be active in an exchange phase; the priority only
// fixes the behaviour for illegal combinations.
//
// Reset (asynchronous, active low) leaves the cell empty holding the valid
// codeword of the word 0. Register widths follow the document; the occupied
// flag and the reset value are this design's choices.
module sorter_cell #(
  parameter int unsigned DATA_W = sorter_pkg::DATA_W,
  parameter int unsigned CHK_W  = sorter_pkg::CHK_W,
  localparam int unsigned CW_W  = DATA_W + CHK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_i,
  input  logic [DATA_W-1:0] load_data_i,
  input  logic              push_i,
  input  logic [CW_W-1:0]   prev_cw_i,
  input  logic              prev_occ_i,
  input  logic              pop_i,
  input  logic [CW_W-1:0]   next_cw_i,
  input  logic              next_occ_i,
  input  logic              wr_lo_i,
  input  logic [CW_W-1:0]   lo_i,
  input  logic              wr_hi_i,
  input  logic [CW_W-1:0]   hi_i,
  output logic [CW_W-1:0]   cw_o,
  output logic              occ_o
);

  // Codeword of the data word 0: every information bit is a 0.
  localparam logic [CW_W-1:0] EMPTY_CW = {{DATA_W{1'b0}}, CHK_W'(DATA_W)};

  logic [DATA_W-1:0] a_q;     // register A
  logic [CHK_W-1:0]  csra_q;  // register CSRA
  logic              occ_q;
  logic [CHK_W-1:0]  load_chk;

  berger_csg #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_csg (
    .data_i(load_data_i),
    .chk_o (load_chk)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a_q, csra_q} <= EMPTY_CW;
      occ_q         <= 1'b0;
    end else if (load_i) begin
      {a_q, csra_q} <= {load_data_i, load_chk};
      occ_q         <= 1'b1;
    end else if (push_i) begin
      {a_q, csra_q} <= prev_cw_i;
      occ_q         <= prev_occ_i;
    end else if (pop_i) begin
      {a_q, csra_q} <= next_cw_i;
      occ_q         <= next_occ_i;
    end else if (wr_lo_i) begin
      {a_q, csra_q} <= lo_i;
    end else if (wr_hi_i) begin
      {a_q, csra_q} <= hi_i;
    end
  end

  assign cw_o  = {a_q, csra_q};
  assign occ_o = occ_q;

endmodule
