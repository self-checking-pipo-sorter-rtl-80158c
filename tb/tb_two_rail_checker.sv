// tb_two_rail_checker -- exhaustive test of a four-pair two-rail checker.
// All 256 input combinations are applied: the output must be complementary
// exactly when every input pair is complementary, and both complementary
// output values must occur.
module tb_two_rail_checker;
  localparam int unsigned NP = 4;
  logic [NP-1:0] x1, x0;
  sorter_pkg::rail_t rail;
  int checks = 0, failures = 0, seen01 = 0, seen10 = 0;

  two_rail_checker #(.NPAIRS(NP)) dut (.x1_i(x1), .x0_i(x0), .rail_o(rail));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**(2*NP); v++) begin
      {x1, x0} = (2*NP)'(v);
      #1;
      checks++;
      if ((rail.r1 ^ rail.r0) != ((x1 ^ x0) == '1)) begin
        failures++;
        $display("FAIL x1=%b x0=%b out=%b%b", x1, x0, rail.r1, rail.r0);
      end
      if (rail.r1 && !rail.r0) seen10++;
      if (!rail.r1 && rail.r0) seen01++;
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
