// tb_pipo_sorter_small -- random command stream on a reduced sorter:
// 5 cells (an odd count), 7-bit words with 3 check bits, descending order.
//
// Every cycle a random command (push, pop, load, sort, or nothing) is applied.
// A reference model holds the stored words: pushes and pops shift it, a load
// replaces it, and a sort orders it from largest to smallest (N odd-even
// phases always sort completely). Whenever the sorter is idle, its parallel
// output, occupancy and status must match the model; each pop must return
// the model's first word; no error flag may ever be raised.
module tb_pipo_sorter_small;
  localparam int unsigned N = 5, DATA_W = 7, CHK_W = 3;
  localparam int unsigned CNT_W = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b1;
  logic push, pop, load, sort;
  logic [DATA_W-1:0] data, pop_data;
  logic [N-1:0][DATA_W-1:0] load_data, data_o;
  logic pop_valid, pop_err, busy, done, empty, full, err_s, err_p;
  logic [N-1:0] occ;
  logic [CNT_W-1:0] count;

  pipo_sorter #(.N(N), .DATA_W(DATA_W), .CHK_W(CHK_W), .DESCENDING(1'b1)) dut (
    .clk(clk), .rst_n(rst_n),
    .push_i(push), .data_i(data), .pop_i(pop), .pop_data_o(pop_data),
    .pop_valid_o(pop_valid), .pop_err_o(pop_err),
    .load_i(load), .load_data_i(load_data), .sort_i(sort),
    .busy_o(busy), .done_o(done), .data_o(data_o), .occ_o(occ), .count_o(count),
    .empty_o(empty), .full_o(full), .err_storage_o(err_s), .err_proc_o(err_p));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sorts = 0, n_pops = 0;
  logic [DATA_W-1:0] m [N];
  int k = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
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
    for (int c = 0; c < 20000; c++) begin
      int r;
      @(negedge clk);
      {push, pop, load, sort} = '0;
      if (busy) continue;
      chk(int'(count) == k && empty == (k == 0) && full == (k == N) && !err_s && !err_p, "status");
      for (int i = 0; i < N; i++) begin
        chk(occ[i] == (i < k), "occupancy");
        if (i < k) chk(data_o[i] == m[i], "parallel out");
      end
      r = $urandom % 20;
      data = DATA_W'($urandom);
      for (int i = 0; i < N; i++) load_data[i] = DATA_W'($urandom % 16);
      if (r < 8) begin
        push = 1'b1;
        if (k < N) begin
          for (int i = N - 1; i > 0; i--) m[i] = m[i-1];
          m[0] = data;
          k++;
        end
      end else if (r < 14) begin
        pop = 1'b1;
        #1;
        chk(pop_valid == (k > 0), "pop valid");
        if (k > 0) begin
          chk(pop_data == m[0] && !pop_err, "pop data");
          for (int i = 0; i < N - 1; i++) m[i] = m[i+1];
          k--;
          n_pops++;
        end
      end else if (r < 15) begin
        load = 1'b1;
        for (int i = 0; i < N; i++) m[i] = load_data[i];
        k = N;
      end else if (r < 18) begin
        sort = 1'b1;
        n_sorts++;
        for (int a = 0; a < k; a++)
          for (int b = 0; b + 1 < k - a; b++)
            if (m[b] < m[b+1]) begin
              logic [DATA_W-1:0] t;
              t = m[b]; m[b] = m[b+1]; m[b+1] = t;
            end
      end
    end
    checks++;
    if (n_sorts == 0 || n_pops == 0) failures++;
    $display("sorts=%0d pops=%0d", n_sorts, n_pops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
