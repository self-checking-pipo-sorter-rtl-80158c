// tb_swap_circuit -- random codeword pairs, with and without exchange.
module tb_swap_circuit;
  localparam int unsigned CW_W = 19;
  logic            swap;
  logic [CW_W-1:0] a, b, lo, hi;
  int checks = 0, failures = 0;

  swap_circuit dut (.swap_i(swap), .a_i(a), .b_i(b), .lo_o(lo), .hi_o(hi));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = CW_W'($urandom);
      b = CW_W'($urandom);
      swap = i[0];
      #1;
      checks++;
      if ((swap && (lo !== b || hi !== a)) || (!swap && (lo !== a || hi !== b))) begin
        failures++;
        if (failures < 10) $display("FAIL swap=%b a=%h b=%h lo=%h hi=%h", swap, a, b, lo, hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
