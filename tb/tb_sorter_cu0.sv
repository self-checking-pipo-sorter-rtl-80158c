// tb_sorter_cu0 -- test of the main control unit (N = 8).
// Checks command acceptance and priorities against the empty/full status,
// the sort sequence (start_sort pulse, exactly N phases alternating odd and
// even starting with odd, busy during them, done one cycle after the last),
// that commands are ignored while sorting, and the sticky error flags.
module tb_sorter_cu0;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic push, pop, load, sort, empty, full, s_err, p_err;
  logic busy, done, err_s, err_p, push_o, pop_o, load_o, start, sort_o, odd;
  int checks = 0, failures = 0;

  sorter_cu0 dut (
    .clk(clk), .rst_n(rst_n), .push_i(push), .pop_i(pop), .load_i(load), .sort_i(sort),
    .busy_o(busy), .done_o(done), .err_storage_o(err_s), .err_proc_o(err_p),
    .empty_i(empty), .full_i(full), .push_o(push_o), .pop_o(pop_o), .load_o(load_o),
    .start_sort_o(start), .sort_o(sort_o), .odd_phase_o(odd),
    .storage_err_i(s_err), .proc_err_i(p_err));

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {push, pop, load, sort, empty, full, s_err, p_err} = '0;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    // idle command decoding, exhaustive over the six inputs
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      {push, pop, load, empty, full} = 5'(v);
      sort = 1'b0;
      #1;
      chk(load_o == load, "load accept");
      chk(pop_o == (!load && pop && !empty), "pop accept");
      chk(push_o == (!load && !pop && push && !full), "push accept");
      chk(!start && !busy && !sort_o, "idle");
    end
    // several sorts
    for (int s = 0; s < 5; s++) begin
      int phases, cycles;
      @(negedge clk);
      {push, pop, load, empty, full} = '0;
      sort = 1'b1;
      #1;
      chk(start, "start_sort pulse");
      chk(!push_o && !pop_o, "sort has priority");
      @(negedge clk);
      sort = 1'b0;
      phases = 0;
      cycles = 0;
      while (!done && cycles < 3 * N) begin
        chk(busy && sort_o, "busy in sort");
        chk(odd == (phases % 2 == 0), "phase parity");
        // commands are ignored while sorting
        push = 1'b1; pop = 1'b1; load = 1'b1; sort = 1'b1;
        #1;
        chk(!push_o && !pop_o && !load_o && !start, "commands blocked");
        s_err = (s == 2 && phases == 3);
        p_err = (s == 3 && phases == 5);
        @(negedge clk);
        {push, pop, load, sort, s_err, p_err} = '0;
        phases++;
        cycles++;
      end
      chk(phases == N, "N exchange phases");
      chk(done && !busy, "done after last phase");
      chk(err_s == (s == 2), "sticky storage error");
      chk(err_p == (s == 3), "sticky processing error");
      @(negedge clk);
      chk(!done, "done is a pulse");
    end
    // a load clears the flags
    @(negedge clk); p_err = 1'b1;
    @(negedge clk); p_err = 1'b0; chk(err_p, "flag set");
    load = 1'b1;
    @(negedge clk); load = 1'b0; chk(!err_p, "flag cleared by load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
