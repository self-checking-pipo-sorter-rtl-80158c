// tb_berger_csg -- exhaustive test of the Berger check symbol generator.
// Every 15-bit word is applied; the expected check symbol is the number of 0s
// counted independently with $countones on the inverted word.
module tb_berger_csg;
  localparam int unsigned DATA_W = 15;
  localparam int unsigned CHK_W  = 4;

  logic [DATA_W-1:0] data;
  logic [CHK_W-1:0]  chk;
  int checks = 0, failures = 0;

  berger_csg dut (.data_i(data), .chk_o(chk));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2**DATA_W; w++) begin
      data = DATA_W'(w);
      #1;
      checks++;
      if (int'(chk) != $countones(~data)) begin
        failures++;
        if (failures < 10) $display("FAIL data=%h chk=%0d expected %0d", data, chk, $countones(~data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
