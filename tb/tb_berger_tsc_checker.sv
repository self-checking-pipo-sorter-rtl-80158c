// tb_berger_tsc_checker -- test of the totally self-checking Berger checker.
// 1. Every valid 19-bit codeword (all 2**15 words with their check symbol,
//    worked out here with $countones) must give a complementary rail pair.
// 2. Every single-bit error of every codeword must be flagged.
// 3. Random unidirectional multi-bit errors (only 1->0 or only 0->1 flips)
//    must be flagged.
// 4. Both complementary outputs (01 and 10) must occur, as a two-rail checker
//    needs for self-testing.
// 5. Self-testing: every single stuck-at fault on the internal nets (the
//    count of 1s and the two-rail tree), injected with force, must make the
//    checker signal an error for at least one valid codeword.
module tb_berger_tsc_checker;
  localparam int unsigned DATA_W = 15;
  localparam int unsigned CHK_W  = 4;
  localparam int unsigned CW_W   = DATA_W + CHK_W;

  logic [CW_W-1:0]   cw;
  sorter_pkg::rail_t rail;
  logic              err;
  int checks = 0, failures = 0;
  int seen01 = 0, seen10 = 0;

  berger_tsc_checker dut (.cw_i(cw), .rail_o(rail), .err_o(err));

  function automatic logic [CW_W-1:0] encode(input logic [DATA_W-1:0] d);
    return {d, CHK_W'($countones(~d))};
  endfunction

  localparam int NFAULT_NETS = 10;
  logic stuck_v;

  task automatic set_fault(input int f);
    case (f)
      0: force dut.ones[0] = stuck_v;
      1: force dut.ones[1] = stuck_v;
      2: force dut.ones[2] = stuck_v;
      3: force dut.ones[3] = stuck_v;
      4: force dut.u_tree.z1[1] = stuck_v;
      5: force dut.u_tree.z1[2] = stuck_v;
      6: force dut.u_tree.z1[3] = stuck_v;
      7: force dut.u_tree.z0[1] = stuck_v;
      8: force dut.u_tree.z0[2] = stuck_v;
      default: force dut.u_tree.z0[3] = stuck_v;
    endcase
  endtask

  task automatic clear_fault(input int f);
    case (f)
      0: release dut.ones[0];
      1: release dut.ones[1];
      2: release dut.ones[2];
      3: release dut.ones[3];
      4: release dut.u_tree.z1[1];
      5: release dut.u_tree.z1[2];
      6: release dut.u_tree.z1[3];
      7: release dut.u_tree.z0[1];
      8: release dut.u_tree.z0[2];
      default: release dut.u_tree.z0[3];
    endcase
  endtask

  task automatic expect_err(input logic exp, input string what);
    #1;
    checks++;
    if (err !== exp || ((rail.r1 ^ rail.r0) === exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s cw=%h rail=%b%b err=%b", what, cw, rail.r1, rail.r0, err);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2**DATA_W; w++) begin
      logic [CW_W-1:0] good;
      good = encode(DATA_W'(w));
      cw = good;
      expect_err(1'b0, "valid");
      if (rail.r1 && !rail.r0) seen10++;
      if (!rail.r1 && rail.r0) seen01++;
      for (int b = 0; b < CW_W; b++) begin
        cw = good ^ (CW_W'(1) << b);
        expect_err(1'b1, "single");
      end
      // unidirectional: clear (or set) a random non-empty subset of the 1s (0s)
      begin
        logic [CW_W-1:0] mask;
        mask = CW_W'($urandom) & good;
        if (mask != '0) begin
          cw = good & ~mask;
          expect_err(1'b1, "uni 1->0");
        end
        mask = CW_W'($urandom) & ~good;
        if (mask != '0) begin
          cw = good | mask;
          expect_err(1'b1, "uni 0->1");
        end
      end
    end
    // self-testing under single stuck-at faults
    for (int f = 0; f < NFAULT_NETS; f++) begin
      for (int v = 0; v < 2; v++) begin
        int detected;
        detected = 0;
        stuck_v = v[0];
        set_fault(f);
        for (int w = 0; w < 2**DATA_W && detected == 0; w++) begin
          cw = encode(DATA_W'(w));
          #1;
          if (err) detected = 1;
        end
        clear_fault(f);
        checks++;
        if (detected == 0) begin
          failures++;
          $display("FAIL stuck-at-%0d on internal net %0d never detected", v, f);
        end
      end
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) begin
      failures++;
      $display("FAIL rail output never took both code values (01:%0d 10:%0d)", seen01, seen10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
