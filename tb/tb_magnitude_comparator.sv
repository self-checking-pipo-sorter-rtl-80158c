// tb_magnitude_comparator -- corner cases and random pairs against the
// built-in unsigned comparison.
module tb_magnitude_comparator;
  localparam int unsigned DATA_W = 15;
  logic [DATA_W-1:0] a, b;
  logic gt, lt;
  int checks = 0, failures = 0;

  magnitude_comparator dut (.a_i(a), .b_i(b), .gt_o(gt), .lt_o(lt));

  task automatic apply(input logic [DATA_W-1:0] x, input logic [DATA_W-1:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (gt !== (x > y) || lt !== (x < y)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h gt=%b lt=%b", x, y, gt, lt);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('0, '1);
    apply('1, '0);
    for (int i = 0; i < DATA_W; i++) begin
      apply(DATA_W'(1) << i, '0);
      apply('0, DATA_W'(1) << i);
      apply(DATA_W'(1) << i, (DATA_W'(1) << i) - 1'b1);
    end
    for (int i = 0; i < 50000; i++) begin
      logic [DATA_W-1:0] x;
      x = DATA_W'($urandom);
      apply(x, DATA_W'($urandom));
      apply(x, x ^ (DATA_W'(1) << ($urandom % DATA_W)));
      apply(x, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
