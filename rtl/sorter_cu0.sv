// sorter_cu0 -- main control unit of the PIPO sorter (next to cell 0).
//
// Takes the host commands and turns them into the control signals of the
// array:
//   push_i   accepted (push_o) when idle and the array is not full;
//   pop_i    accepted (pop_o) when idle and the array is not empty;
//   load_i   parallel load of all cells, accepted (load_o) when idle;
//   sort_i   starts a sort: start_sort_o pulses, the phase counter is
//            cleared and N exchange phases follow, one per clock cycle,
//            odd exchange first, then even, then odd ... (N/2 iterations of
//            two phases). sort_o is high during the phases, odd_phase_o gives
//            the parity, busy_o is high throughout, and done_o pulses for one
//            cycle right after the last phase, when the cells hold the sorted
//            words.
// At most one command is accepted per cycle, by priority load, sort, pop,
// push; commands arriving during a sort are ignored.
//
// The error inputs are the ORed checker reports of the control units and the
// pop checker. They set sticky flags err_storage_o / err_proc_o, which a new
// sort or load clears. The phase counting, command priorities and the sticky
// flags are this design's choices; the document names the unit's duties only.
module sorter_cu0 #(
  parameter int unsigned N  = 8,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic clk,
  input  logic rst_n,
  // host
  input  logic push_i,
  input  logic pop_i,
  input  logic load_i,
  input  logic sort_i,
  output logic busy_o,
  output logic done_o,
  output logic err_storage_o,
  output logic err_proc_o,
  // status counter
  input  logic empty_i,
  input  logic full_i,
  // array control
  output logic push_o,
  output logic pop_o,
  output logic load_o,
  output logic start_sort_o,
  output logic sort_o,
  output logic odd_phase_o,
  // checker reports
  input  logic storage_err_i,
  input  logic proc_err_i
);

  typedef enum logic {S_IDLE, S_SORT} state_e;

  state_e        state_q;
  logic [CW-1:0] phase;
  logic          last_phase;
  logic          unused_zero, unused_max;

  assign load_o       = (state_q == S_IDLE) && load_i;
  assign start_sort_o = (state_q == S_IDLE) && !load_i && sort_i;
  assign pop_o        = (state_q == S_IDLE) && !load_i && !sort_i && pop_i && !empty_i;
  assign push_o       = (state_q == S_IDLE) && !load_i && !sort_i && !pop_i && push_i && !full_i;

  assign sort_o      = (state_q == S_SORT);
  assign odd_phase_o = ~phase[0];                 // phase 0 is an odd exchange
  assign last_phase  = sort_o && (phase == CW'(N - 1));
  assign busy_o      = sort_o;

  // phase counter: cleared by start_sort, counts the exchange phases
  up_down_counter #(.W(CW), .MAX(N)) u_phase (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr_i  (start_sort_o),
    .load_i (1'b0),
    .value_i('0),
    .up_i   (sort_o),
    .down_i (1'b0),
    .count_o(phase),
    .zero_o (unused_zero),
    .max_o  (unused_max)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      done_o        <= 1'b0;
      err_storage_o <= 1'b0;
      err_proc_o    <= 1'b0;
    end else begin
      done_o <= last_phase;
      unique case (state_q)
        S_IDLE: if (start_sort_o) state_q <= S_SORT;
        S_SORT: if (last_phase)   state_q <= S_IDLE;
        default:                  state_q <= S_IDLE;
      endcase
      if (start_sort_o || load_o) begin
        err_storage_o <= 1'b0;
        err_proc_o    <= 1'b0;
      end else begin
        if (storage_err_i) err_storage_o <= 1'b1;
        if (proc_err_i)    err_proc_o    <= 1'b1;
      end
    end
  end

  // a sort must always end after N phases
  a_sort_ends: assert property (@(posedge clk) disable iff (!rst_n)
    start_sort_o |-> ##(N+1) done_o);

endmodule
