// tb_sorter_cu -- test of one control unit (IDX = 3, ascending order).
// Random codeword pairs in both phases and with every occupancy: the
// expected write enable and outputs come from a direct comparison here.
// Storage faults: unidirectional errors in an input codeword must raise
// err_storage_o and block the exchange. Processing faults: a stuck swap
// output (forced) must raise err_proc_o and close the buffers. The
// pass-through control signals are checked too. A second unit (IDX = 2,
// DESCENDING = 1) checks the reversed order and the even-phase pairing.
module tb_sorter_cu;
  localparam int unsigned DATA_W = 15, CHK_W = 4, CW_W = DATA_W + CHK_W;
  localparam int unsigned IDX = 3;

  logic sort, odd, push, pop, a_occ, b_occ;
  logic sort_o, odd_o, push_o, pop_o, occB;
  logic [CW_W-1:0] a, b, lo, hi, npopA, d_npopA;
  logic we, active, err_s, err_p;
  int checks = 0, failures = 0;
  int n_swap = 0, n_err_s = 0, n_err_p = 0, n_desc = 0;

  sorter_cu #(.DATA_W(DATA_W), .CHK_W(CHK_W), .IDX(IDX)) dut (
    .sort_i(sort), .odd_phase_i(odd), .push_i(push), .pop_i(pop),
    .sort_o(sort_o), .odd_phase_o(odd_o), .sigpush_o(push_o), .sigpop_o(pop_o), .occB_o(occB), .npopA_o(npopA),
    .a_i(a), .a_occ_i(a_occ), .b_i(b), .b_occ_i(b_occ),
    .lo_o(lo), .hi_o(hi), .we_o(we), .active_o(active),
    .err_storage_o(err_s), .err_proc_o(err_p));

  logic [CW_W-1:0] d_lo, d_hi;
  logic d_we, d_active, d_err_s, d_err_p;
  logic d_sort_o, d_odd_o, d_push_o, d_pop_o, d_occB;

  sorter_cu #(.DATA_W(DATA_W), .CHK_W(CHK_W), .IDX(2), .DESCENDING(1'b1)) dut_d (
    .sort_i(sort), .odd_phase_i(odd), .push_i(push), .pop_i(pop),
    .sort_o(d_sort_o), .odd_phase_o(d_odd_o), .sigpush_o(d_push_o), .sigpop_o(d_pop_o), .occB_o(d_occB), .npopA_o(d_npopA),
    .a_i(a), .a_occ_i(a_occ), .b_i(b), .b_occ_i(b_occ),
    .lo_o(d_lo), .hi_o(d_hi), .we_o(d_we), .active_o(d_active),
    .err_storage_o(d_err_s), .err_proc_o(d_err_p));

  function automatic logic [CW_W-1:0] enc(input logic [DATA_W-1:0] d);
    return {d, CHK_W'($countones(~d))};
  endfunction

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s a=%h b=%h lo=%h hi=%h we=%b es=%b ep=%b", what, a, b, lo, hi, we, err_s, err_p);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [DATA_W-1:0] da, db;
      logic exp_act, exp_swap;
      da = DATA_W'($urandom);
      db = (i % 7 == 0) ? da : DATA_W'($urandom);
      a = enc(da); b = enc(db);
      sort = ($urandom % 4) != 0; odd = 1'($urandom);
      a_occ = ($urandom % 8) != 0; b_occ = ($urandom % 8) != 0;
      push = 1'($urandom); pop = 1'($urandom);
      #1;
      exp_act  = sort && (odd == IDX[0]) && a_occ && b_occ;
      exp_swap = exp_act && (da > db);
      checks++;
      if (active !== exp_act || we !== exp_swap || err_s || err_p) fail("flags");
      checks++;
      if (exp_act && (lo !== (exp_swap ? b : a) || hi !== (exp_swap ? a : b))) fail("values");
      if (we && lo[CW_W-1:CHK_W] > hi[CW_W-1:CHK_W]) fail("order");
      checks++;
      if (sort_o !== sort || odd_o !== odd || push_o !== push || pop_o !== pop || occB !== b_occ || npopA !== b) fail("chain");
      if (we) n_swap++;
      // descending unit on the even phase
      checks++;
      if (d_active !== (sort && !odd && a_occ && b_occ) ||
          d_we !== (d_active && (da < db)) ||
          (d_active && (d_lo !== (d_we ? b : a) || d_hi !== (d_we ? a : b)))) fail("descending");
      if (d_we) n_desc++;
    end
    // storage faults
    for (int i = 0; i < 5000; i++) begin
      logic [CW_W-1:0] ga, gb, mask;
      ga = enc(DATA_W'($urandom)); gb = enc(DATA_W'($urandom));
      sort = 1'b1; odd = IDX[0]; a_occ = 1'b1; b_occ = 1'b1;
      mask = CW_W'($urandom) | CW_W'(1) << ($urandom % CW_W);
      if (i[0]) begin
        a = ga; b = (i[1]) ? (gb & ~mask) : (gb | mask);
        if (b == gb) b = gb ^ (CW_W'(1) << 2);
      end else begin
        b = gb; a = (i[1]) ? (ga & ~mask) : (ga | mask);
        if (a == ga) a = ga ^ (CW_W'(1) << 2);
      end
      #1;
      checks++;
      if (!err_s || we) fail("storage fault");
      else n_err_s++;
    end
    // processing faults: one output bit of the swap circuit stuck
    for (int i = 0; i < 2000; i++) begin
      logic [DATA_W-1:0] da, db;
      int bitpos;
      logic [CW_W-1:0] fv;
      da = DATA_W'($urandom); db = DATA_W'($urandom);
      a = enc(da); b = enc(db);
      sort = 1'b1; odd = IDX[0]; a_occ = 1'b1; b_occ = 1'b1;
      bitpos = $urandom % CW_W;
      #1;
      fv = (i[0] ? lo : hi) ^ (CW_W'(1) << bitpos);
      if (i[0]) force dut.lo_o = fv;
      else      force dut.hi_o = fv;
      #1;
      checks++;
      if (!err_p || we || err_s) fail("processing fault");
      else n_err_p++;
      release dut.lo_o;
      release dut.hi_o;
      #1;
    end
    checks++;
    if (n_swap == 0 || n_err_s == 0 || n_err_p == 0 || n_desc == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: swap=%0d storage=%0d processing=%0d", n_swap, n_err_s, n_err_p);
    end
    $display("exchanges=%0d storage_errors=%0d processing_errors=%0d", n_swap, n_err_s, n_err_p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
