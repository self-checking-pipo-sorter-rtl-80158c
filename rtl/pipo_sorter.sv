// pipo_sorter -- self-checking parallel-in parallel-out odd-even transposition
// sorter protected by a Berger code.
//
// N cells form a one-dimensional array. Each holds one word as a Berger
// codeword (15 information bits in register A, 4 check bits in register
// CSRA) and an occupied flag. Between every two neighbouring cells a control
// unit (sorter_cu) compares and exchanges their words; it checks the stored
// codewords before the exchange (storage faults) and the exchanged codewords
// after it (processing faults) and blocks the write-back if either check
// fails. The main control unit (sorter_cu0) next to cell 0 takes the host
// commands; a status counter beside it counts the stored words.
//
// Host interface (one command per cycle, see sorter_cu0 for priorities):
//   push_i/data_i    the word gets its check symbol and enters cell 0 while
//                    every stored word moves one cell up (ignored when full);
//   pop_i            pop_data_o/pop_valid_o give cell 0's word in the same
//                    cycle, and every word moves one cell down (ignored when
//                    empty); pop_err_o flags a storage error in that word;
//   load_i           writes load_data_i[0..N-1] into all cells at once;
//   sort_i           runs N exchange phases (odd, even, odd, ...), one per
//                    cycle; busy_o is high during them and done_o pulses in
//                    the cycle after the last, N+1 cycles after sort_i was
//                    taken. The stored words are then in order, the smallest
//                    in cell 0 (largest with DESCENDING = 1), empty cells last.
//   data_o/occ_o     parallel output of all cells;
//   count_o, empty_o, full_o   status counter;
//   err_storage_o, err_proc_o  sticky error flags, cleared by sort or load.
//
// The array, the checkers and the control-unit chain follow the document;
// the number of cells (N = 8), the parallel-load port, the occupied flags and
// the host handshake are this design's choices.
module pipo_sorter #(
  parameter int unsigned N          = 8,
  parameter int unsigned DATA_W     = sorter_pkg::DATA_W,
  parameter int unsigned CHK_W      = sorter_pkg::CHK_W,
  parameter bit          DESCENDING = 1'b0,
  localparam int unsigned CW_W      = DATA_W + CHK_W,
  localparam int unsigned CNT_W     = $clog2(N + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host commands
  input  logic                        push_i,
  input  logic [DATA_W-1:0]           data_i,
  input  logic                        pop_i,
  output logic [DATA_W-1:0]           pop_data_o,
  output logic                        pop_valid_o,
  output logic                        pop_err_o,
  input  logic                        load_i,
  input  logic [N-1:0][DATA_W-1:0]    load_data_i,
  input  logic                        sort_i,
  output logic                        busy_o,
  output logic                        done_o,
  // parallel out and status
  output logic [N-1:0][DATA_W-1:0]    data_o,
  output logic [N-1:0]                occ_o,
  output logic [CNT_W-1:0]            count_o,
  output logic                        empty_o,
  output logic                        full_o,
  output logic                        err_storage_o,
  output logic                        err_proc_o
);

  localparam logic [CW_W-1:0] EMPTY_CW = {{DATA_W{1'b0}}, CHK_W'(DATA_W)};

  if (N < 2) begin : g_bad_n
    $error("pipo_sorter needs at least two cells");
  end

  logic [N-1:0][CW_W-1:0] cw;
  logic [N-1:0]           occ;

  // control chain: index i is the signal entering control unit i
  logic [N-1:0] sort_c, odd_c, push_c, pop_c;
  logic [N-2:0] occB;
  logic [N-2:0][CW_W-1:0] npopA;

  logic [N-2:0][CW_W-1:0] lo, hi;
  logic [N-2:0]           we, active, err_s, err_p;

  logic push, pop, load, start_sort;
  logic [CHK_W-1:0] push_chk;
  logic [CW_W-1:0]  push_cw;
  sorter_pkg::rail_t pop_rail;
  logic pop_chk_err;

  // ---------------------------------------------------------------- CU0
  sorter_cu0 #(.N(N)) u_cu0 (
    .clk          (clk),
    .rst_n        (rst_n),
    .push_i       (push_i),
    .pop_i        (pop_i),
    .load_i       (load_i),
    .sort_i       (sort_i),
    .busy_o       (busy_o),
    .done_o       (done_o),
    .err_storage_o(err_storage_o),
    .err_proc_o   (err_proc_o),
    .empty_i      (empty_o),
    .full_i       (full_o),
    .push_o       (push),
    .pop_o        (pop),
    .load_o       (load),
    .start_sort_o (start_sort),
    .sort_o       (sort_c[0]),
    .odd_phase_o  (odd_c[0]),
    .storage_err_i((|err_s) || pop_err_o),
    .proc_err_i   (|err_p)
  );

  assign push_c[0] = push;
  assign pop_c[0]  = pop;

  // status counter of cell 0: number of stored words
  up_down_counter #(.W(CNT_W), .MAX(N)) u_status (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr_i  (1'b0),
    .load_i (load),
    .value_i(CNT_W'(N)),
    .up_i   (push),
    .down_i (pop),
    .count_o(count_o),
    .zero_o (empty_o),
    .max_o  (full_o)
  );

  // check symbol of a pushed word
  berger_csg #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_push_csg (
    .data_i(data_i),
    .chk_o (push_chk)
  );
  assign push_cw = {data_i, push_chk};

  // storage checker on the word leaving by pop
  berger_tsc_checker #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_pop_chk (
    .cw_i  (cw[0]),
    .rail_o(pop_rail),
    .err_o (pop_chk_err)
  );
  assign pop_valid_o = pop;
  assign pop_data_o  = cw[0][CW_W-1:CHK_W];
  assign pop_err_o   = pop && pop_chk_err;

  // ---------------------------------------------------------------- cells
  for (genvar i = 0; i < N; i++) begin : g_cell
    logic [CW_W-1:0] prev_cw, next_cw;
    logic            prev_occ, next_occ;
    logic            wr_lo, wr_hi;
    logic [CW_W-1:0] lo_v, hi_v;

    if (i == 0) begin : g_first
      assign prev_cw  = push_cw;
      assign prev_occ = 1'b1;
      assign wr_hi    = 1'b0;
      assign hi_v     = EMPTY_CW;
    end else begin : g_inner
      assign prev_cw  = cw[i-1];
      assign prev_occ = occ[i-1];
      assign wr_hi    = we[i-1];
      assign hi_v     = hi[i-1];
    end

    if (i == N - 1) begin : g_last
      assign next_cw  = EMPTY_CW;
      assign next_occ = 1'b0;
      assign wr_lo    = 1'b0;
      assign lo_v     = EMPTY_CW;
    end else begin : g_below
      assign next_cw  = npopA[i];
      assign next_occ = occB[i];
      assign wr_lo    = we[i];
      assign lo_v     = lo[i];
    end

    sorter_cell #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_cell (
      .clk        (clk),
      .rst_n      (rst_n),
      .load_i     (load),
      .load_data_i(load_data_i[i]),
      .push_i     (push_c[i]),
      .prev_cw_i  (prev_cw),
      .prev_occ_i (prev_occ),
      .pop_i      (pop_c[i]),
      .next_cw_i  (next_cw),
      .next_occ_i (next_occ),
      .wr_lo_i    (wr_lo),
      .lo_i       (lo_v),
      .wr_hi_i    (wr_hi),
      .hi_i       (hi_v),
      .cw_o       (cw[i]),
      .occ_o      (occ[i])
    );

    assign data_o[i] = cw[i][CW_W-1:CHK_W];
  end

  assign occ_o = occ;

  // ------------------------------------------------- control units CU1..
  for (genvar i = 0; i < N - 1; i++) begin : g_cu
    sorter_cu #(.DATA_W(DATA_W), .CHK_W(CHK_W), .IDX(i), .DESCENDING(DESCENDING)) u_cu (
      .sort_i       (sort_c[i]),
      .odd_phase_i  (odd_c[i]),
      .push_i       (push_c[i]),
      .pop_i        (pop_c[i]),
      .sort_o       (sort_c[i+1]),
      .odd_phase_o  (odd_c[i+1]),
      .sigpush_o    (push_c[i+1]),
      .sigpop_o     (pop_c[i+1]),
      .occB_o       (occB[i]),
      .npopA_o      (npopA[i]),
      .a_i          (cw[i]),
      .a_occ_i      (occ[i]),
      .b_i          (cw[i+1]),
      .b_occ_i      (occ[i+1]),
      .lo_o         (lo[i]),
      .hi_o         (hi[i]),
      .we_o         (we[i]),
      .active_o     (active[i]),
      .err_storage_o(err_s[i]),
      .err_proc_o   (err_p[i])
    );
  end

  // The occupied cells always form a block from cell 0 upward.
  a_occ_prefix: assert property (@(posedge clk) disable iff (!rst_n)
    ((occ + 1'b1) & occ) == '0);

  logic unused;
  assign unused = ^{active, pop_rail, start_sort, sort_c[N-1], odd_c[N-1]};

endmodule
