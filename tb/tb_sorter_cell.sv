// tb_sorter_cell -- random load/push/pop/exchange writes against a model of
// the cell, checking the stored codeword (with the check symbol of a loaded
// word worked out here), the occupied flag, the selection priority and reset.
module tb_sorter_cell;
  localparam int unsigned DATA_W = 15, CHK_W = 4, CW_W = DATA_W + CHK_W;
  logic clk = 1'b0, rst_n = 1'b1;
  logic load, push, pop, wr_lo, wr_hi, prev_occ, next_occ, occ;
  logic [DATA_W-1:0] load_data;
  logic [CW_W-1:0]   prev_cw, next_cw, lo, hi, cw;
  logic [CW_W-1:0]   m_cw;
  logic              m_occ;
  int checks = 0, failures = 0;

  sorter_cell dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .load_data_i(load_data),
    .push_i(push), .prev_cw_i(prev_cw), .prev_occ_i(prev_occ),
    .pop_i(pop), .next_cw_i(next_cw), .next_occ_i(next_occ),
    .wr_lo_i(wr_lo), .lo_i(lo), .wr_hi_i(wr_hi), .hi_i(hi),
    .cw_o(cw), .occ_o(occ));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (cw !== m_cw || occ !== m_occ) begin
      failures++;
      if (failures < 10) $display("FAIL %s cw=%h/%b expected %h/%b", what, cw, occ, m_cw, m_occ);
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
    {load, push, pop, wr_lo, wr_hi, prev_occ, next_occ} = '0;
    {load_data, prev_cw, next_cw, lo, hi} = '0;
    #1 rst_n = 1'b0;
    #1;
    m_cw = {{DATA_W{1'b0}}, CHK_W'(DATA_W)};
    m_occ = 1'b0;
    compare("reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      compare("step");
      load      = ($urandom % 6) == 0;
      push      = ($urandom % 3) == 0;
      pop       = ($urandom % 3) == 0;
      wr_lo     = ($urandom % 2) == 0;
      wr_hi     = ($urandom % 2) == 0;
      load_data = DATA_W'($urandom);
      prev_cw   = CW_W'($urandom);
      next_cw   = CW_W'($urandom);
      lo        = CW_W'($urandom);
      hi        = CW_W'($urandom);
      prev_occ  = 1'($urandom);
      next_occ  = 1'($urandom);
      if (load)       begin m_cw = {load_data, CHK_W'($countones(~load_data))}; m_occ = 1'b1; end
      else if (push)  begin m_cw = prev_cw; m_occ = prev_occ; end
      else if (pop)   begin m_cw = next_cw; m_occ = next_occ; end
      else if (wr_lo) m_cw = lo;
      else if (wr_hi) m_cw = hi;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
