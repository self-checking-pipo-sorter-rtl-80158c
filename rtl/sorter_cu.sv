// sorter_cu -- control unit between cell IDX and cell IDX+1.
//
// It performs the compare-exchange step of odd-even transposition sorting on
// its two cells and checks it concurrently with the Berger code:
//
//   storage check    both stored codewords go to the comparator and, at the
//                    same time, to a totally self-checking Berger checker
//                    each; the two checker outputs are merged by a two-rail
//                    checker. An error stops the comparator result from
//                    being used (no exchange).
//   compare/swap     the comparator decides whether the pair is out of
//                    order; the swap circuit exchanges whole codewords.
//   processing check both swapped codewords pass through a second pair of
//                    Berger checkers. An error closes the buffers, so the
//                    cells keep their old contents.
//
// The pair takes part in the current phase when sort_i is high and the phase
// parity matches the parity of IDX (odd phase: pairs (1,2), (3,4), ...; even
// phase: pairs (0,1), (2,3), ...), and only when both cells hold a word.
// Words fill the cells from cell 0 upward, so an empty cell is never below an
// occupied one. By default the smaller word goes to the lower cell
// (ascending order from cell 0); DESCENDING = 1 reverses that.
//
// The control signals of the chain pass through the unit to the next one
// (sort and phase parity, push and pop), and towards the lower cell it
// returns occB_o (the upper cell holds a word) and npopA_o (the upper cell's
// codeword, which moves down on a pop). These outputs are plain wires from
// the inputs; they exist so that the unit carries all the signals between
// two cells. All paths are combinational: the exchange is written at
// the next clock edge, so one phase takes one clock cycle and the checks add
// no cycle. The checker arrangement follows the document's block diagrams;
// the gating details and the order option are this design's own.
module sorter_cu #(
  parameter int unsigned DATA_W     = sorter_pkg::DATA_W,
  parameter int unsigned CHK_W      = sorter_pkg::CHK_W,
  parameter int unsigned IDX        = 0,
  parameter bit          DESCENDING = 1'b0,
  localparam int unsigned CW_W      = DATA_W + CHK_W
) (
  // chained control
  input  logic            sort_i,       // an exchange phase is running
  input  logic            odd_phase_i,  // 1: odd exchange, 0: even exchange
  input  logic            push_i,
  input  logic            pop_i,
  output logic            sort_o,
  output logic            odd_phase_o,
  output logic            sigpush_o,
  output logic            sigpop_o,
  output logic            occB_o,       // cell IDX+1 holds a word
  output logic [CW_W-1:0] npopA_o,      // word that moves into cell IDX on a pop
  // the two cells
  input  logic [CW_W-1:0] a_i,          // cell IDX
  input  logic            a_occ_i,
  input  logic [CW_W-1:0] b_i,          // cell IDX+1
  input  logic            b_occ_i,
  // results
  output logic [CW_W-1:0] lo_o,         // next value of cell IDX
  output logic [CW_W-1:0] hi_o,         // next value of cell IDX+1
  output logic            we_o,         // buffers open: write lo_o/hi_o
  output logic            active_o,     // the pair is compared this cycle
  output logic            err_storage_o,
  output logic            err_proc_o
);

  import sorter_pkg::rail_t;

  logic  active, gt, lt, out_of_order, swap;
  rail_t rail_sa, rail_sb, rail_s, rail_pa, rail_pb, rail_p;
  logic  unused_sa, unused_sb, unused_pa, unused_pb;
  logic  storage_err, proc_err;

  assign active = sort_i && (odd_phase_i == IDX[0]) && a_occ_i && b_occ_i;

  // storage-fault checking, in parallel with the comparator
  berger_tsc_checker #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_chk_sa (
    .cw_i(a_i), .rail_o(rail_sa), .err_o(unused_sa));
  berger_tsc_checker #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_chk_sb (
    .cw_i(b_i), .rail_o(rail_sb), .err_o(unused_sb));
  two_rail_checker #(.NPAIRS(2)) u_merge_s (
    .x1_i({rail_sb.r1, rail_sa.r1}), .x0_i({rail_sb.r0, rail_sa.r0}), .rail_o(rail_s));
  assign storage_err = ~(rail_s.r1 ^ rail_s.r0);

  magnitude_comparator #(.DATA_W(DATA_W)) u_cmp (
    .a_i (a_i[CW_W-1:CHK_W]),
    .b_i (b_i[CW_W-1:CHK_W]),
    .gt_o(gt),
    .lt_o(lt)
  );

  assign out_of_order = DESCENDING ? lt : gt;
  assign swap         = active && out_of_order && !storage_err;

  swap_circuit #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_swap (
    .swap_i(swap), .a_i(a_i), .b_i(b_i), .lo_o(lo_o), .hi_o(hi_o));

  // processing-fault checking after the swap
  berger_tsc_checker #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_chk_pa (
    .cw_i(lo_o), .rail_o(rail_pa), .err_o(unused_pa));
  berger_tsc_checker #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_chk_pb (
    .cw_i(hi_o), .rail_o(rail_pb), .err_o(unused_pb));
  two_rail_checker #(.NPAIRS(2)) u_merge_p (
    .x1_i({rail_pb.r1, rail_pa.r1}), .x0_i({rail_pb.r0, rail_pa.r0}), .rail_o(rail_p));
  assign proc_err = ~(rail_p.r1 ^ rail_p.r0);

  assign we_o          = swap && !proc_err;
  assign active_o      = active;
  assign err_storage_o = active && storage_err;
  assign err_proc_o    = active && !storage_err && proc_err;

  assign sort_o      = sort_i;
  assign odd_phase_o = odd_phase_i;
  assign sigpush_o   = push_i;
  assign sigpop_o    = pop_i;
  assign occB_o      = b_occ_i;
  assign npopA_o     = b_i;

endmodule
