// tb_pipo_sorter -- end-to-end test of the self-checking PIPO sorter at its
// default size (8 cells of 15-bit words).
//
// A reference model kept here (a list of stored words and its own odd-even
// transposition schedule) predicts the parallel output, the count and every
// popped word. The test runs:
//   push until full, pop until empty, with refused commands at both ends;
//   sorts of full and partly filled arrays after pushes and parallel loads,
//   checking the N+1 cycle latency from the sort command to done;
//   commands issued during a sort (ignored);
//   a storage fault: one stored bit flipped, which must raise the storage
//   flag, keep the damaged word out of every exchange and flag its pop;
//   a processing fault: one control unit's swap output stuck at an invalid
//   codeword during a sort, which must raise the processing flag and keep
//   that pair from writing.
// Each of these mechanisms is counted and must happen at least once.
module tb_pipo_sorter;
  localparam int unsigned N = 8, DATA_W = 15, CHK_W = 4;
  localparam int unsigned CW_W = DATA_W + CHK_W;
  localparam int unsigned CNT_W = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b1;
  logic push, pop, load, sort;
  logic [DATA_W-1:0] data;
  logic [N-1:0][DATA_W-1:0] load_data, data_o;
  logic [DATA_W-1:0] pop_data;
  logic pop_valid, pop_err, busy, done, empty, full, err_s, err_p;
  logic [N-1:0] occ;
  logic [CNT_W-1:0] count;

  pipo_sorter dut (
    .clk(clk), .rst_n(rst_n),
    .push_i(push), .data_i(data), .pop_i(pop), .pop_data_o(pop_data),
    .pop_valid_o(pop_valid), .pop_err_o(pop_err),
    .load_i(load), .load_data_i(load_data), .sort_i(sort),
    .busy_o(busy), .done_o(done), .data_o(data_o), .occ_o(occ), .count_o(count),
    .empty_o(empty), .full_o(full), .err_storage_o(err_s), .err_proc_o(err_p));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // reference model: m[0..k-1] are the words in cells 0..k-1
  logic [DATA_W-1:0] m [N];
  int k = 0;

  // mechanism counters
  int n_push = 0, n_push_full = 0, n_pop = 0, n_pop_empty = 0, n_load = 0;
  int n_sort = 0, n_partial_sort = 0, n_exchange = 0, n_ignored = 0;
  int n_storage = 0, n_pop_err = 0, n_proc = 0;

  always @(posedge clk) if (rst_n) n_exchange <= n_exchange + $countones(dut.we);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare_state(input string what);
    chk(int'(count) == k && empty == (k == 0) && full == (k == N), {what, ": status"});
    for (int i = 0; i < N; i++) begin
      chk(occ[i] == (i < k), {what, ": occupancy"});
      if (i < k) chk(data_o[i] == m[i], {what, ": parallel out"});
    end
  endtask

  // odd-even transposition schedule of the model; a pair is skipped when
  // blocked_pair names it or when it holds the cell bad_cell
  task automatic model_sort(input int blocked_pair, input int bad_cell);
    for (int ph = 0; ph < N; ph++) begin
      for (int i = (ph % 2 == 0) ? 1 : 0; i + 1 < k; i += 2) begin
        if (i != blocked_pair && i != bad_cell && i + 1 != bad_cell && m[i] > m[i+1]) begin
          logic [DATA_W-1:0] t;
          t = m[i]; m[i] = m[i+1]; m[i+1] = t;
        end
      end
    end
  endtask

  task automatic do_push(input logic [DATA_W-1:0] w);
    @(negedge clk);
    push = 1'b1; data = w;
    @(negedge clk);
    push = 1'b0;
    if (k < N) begin
      for (int i = N - 1; i > 0; i--) m[i] = m[i-1];
      m[0] = w;
      k++;
      n_push++;
    end else n_push_full++;
    compare_state("push");
  endtask

  task automatic do_pop(input logic expect_err);
    @(negedge clk);
    pop = 1'b1;
    #1;
    chk(pop_valid == (k > 0), "pop accepted");
    if (k > 0) begin
      chk(pop_data == m[0], "pop data");
      chk(pop_err == expect_err, "pop error flag");
      if (pop_err) n_pop_err++;
    end
    @(negedge clk);
    pop = 1'b0;
    if (k > 0) begin
      for (int i = 0; i < N - 1; i++) m[i] = m[i+1];
      k--;
      n_pop++;
    end else n_pop_empty++;
    compare_state("pop");
  endtask

  task automatic do_load();
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      load_data[i] = DATA_W'($urandom);
      if ($urandom % 4 == 0) load_data[i] = load_data[(i + 1) % N];  // duplicates
      m[i] = load_data[i];
    end
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    k = N;
    n_load++;
    compare_state("load");
  endtask

  // sort and wait for done; checks the latency and that commands are ignored
  task automatic do_sort(input int blocked_pair, input int bad_cell);
    int cycles;
    @(negedge clk);
    sort = 1'b1;
    @(negedge clk);
    sort = 1'b0;
    cycles = 1;
    while (!done && cycles < 4 * N) begin
      chk(busy, "busy during sort");
      if (cycles == 2) begin
        push = 1'b1; pop = 1'b1; data = '1;
      end
      @(negedge clk);
      if (cycles == 2) begin
        push = 1'b0; pop = 1'b0;
        n_ignored++;
      end
      cycles++;
    end
    chk(cycles == N + 1, "sort latency N+1 cycles");
    chk(!busy, "idle after done");
    model_sort(blocked_pair, bad_cell);
    n_sort++;
    if (k < N) n_partial_sort++;
    compare_state("sort");
    if (blocked_pair < 0 && bad_cell < 0)
      for (int i = 0; i + 1 < k; i++) chk(data_o[i] <= data_o[i+1], "ascending order");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {push, pop, load, sort} = '0;
    data = '0;
    load_data = '0;
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    compare_state("reset");
    chk(!err_s && !err_p && !busy, "reset flags");

    do_pop(1'b0);                                   // refused: empty
    for (int i = 0; i < N + 2; i++) do_push(DATA_W'($urandom));   // last two refused
    do_sort(-1, -1);
    chk(!err_s && !err_p, "no error flags");
    for (int i = 0; i < N + 1; i++) do_pop(1'b0);   // ascending, last refused

    // partly filled arrays
    for (int r = 0; r < 6; r++) begin
      int fill;
      fill = 1 + r % N;
      for (int i = 0; i < fill; i++) do_push(DATA_W'($urandom % 64));
      do_sort(-1, -1);
      for (int i = 0; i < fill; i++) do_pop(1'b0);
    end

    // parallel loads, including already-sorted and reversed input
    for (int r = 0; r < 4; r++) begin
      do_load();
      do_sort(-1, -1);
      do_sort(-1, -1);
    end
    do_load();
    for (int i = 0; i < N; i++) m[i] = DATA_W'(1000 - 10 * i);
    @(negedge clk);
    load_data = '0;
    for (int i = 0; i < N; i++) load_data[i] = m[i];
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    do_sort(-1, -1);

    // storage fault: a 1 of the stored word of cell 3 becomes a 0
    begin
      logic [DATA_W-1:0] bad;
      do_load();
      m[3] = m[3] | DATA_W'(1);
      @(negedge clk);
      load_data[3] = m[3];
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      bad = m[3] & ~DATA_W'(1);
      force dut.g_cell[3].u_cell.a_q = bad;
      #1 release dut.g_cell[3].u_cell.a_q;
      m[3] = bad;
      compare_state("storage fault injected");
      do_sort(-1, 3);
      chk(err_s && !err_p, "storage error flag");
      if (err_s) n_storage++;
      // pop down to the damaged word; its pop must be flagged
      for (int i = 0; i < 3; i++) do_pop(1'b0);
      do_pop(1'b1);
      for (int i = 0; i < N - 4; i++) do_pop(1'b0);
    end

    // processing fault: swap output of control unit 2 stuck at an invalid codeword
    begin
      do_load();
      force dut.g_cu[2].u_cu.lo_o = '0;
      do_sort(2, -1);
      release dut.g_cu[2].u_cu.lo_o;
      chk(err_p, "processing error flag");
      if (err_p) n_proc++;
      do_sort(-1, -1);
      chk(!err_s && !err_p, "flags cleared by the next sort");
    end

    $display("push=%0d push_full=%0d pop=%0d pop_empty=%0d load=%0d sort=%0d partial_sort=%0d",
             n_push, n_push_full, n_pop, n_pop_empty, n_load, n_sort, n_partial_sort);
    $display("exchanges=%0d ignored_during_sort=%0d storage_err=%0d pop_err=%0d proc_err=%0d",
             n_exchange, n_ignored, n_storage, n_pop_err, n_proc);
    checks++;
    if (n_push == 0 || n_push_full == 0 || n_pop == 0 || n_pop_empty == 0 || n_load == 0 ||
        n_sort == 0 || n_partial_sort == 0 || n_exchange == 0 || n_ignored == 0 ||
        n_storage == 0 || n_pop_err == 0 || n_proc == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
