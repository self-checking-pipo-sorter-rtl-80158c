// tb_up_down_counter -- random clear/load/up/down sequences against a model,
// including saturation at 0 and at MAX.
module tb_up_down_counter;
  localparam int unsigned W = 4, MAX = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic clr, load, up, down;
  logic [W-1:0] value, count;
  logic zero, max;
  int model = 0;
  int checks = 0, failures = 0;
  int sat_lo = 0, sat_hi = 0;

  up_down_counter dut (
    .clk(clk), .rst_n(rst_n), .clr_i(clr), .load_i(load), .value_i(value),
    .up_i(up), .down_i(down), .count_o(count), .zero_o(zero), .max_o(max));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {clr, load, up, down, value} = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model || zero !== (model == 0) || max !== (model == MAX)) begin
        failures++;
        if (failures < 10) $display("FAIL count=%0d model=%0d", count, model);
      end
      clr   = ($urandom % 50) == 0;
      load  = ($urandom % 50) == 0;
      value = W'($urandom % (MAX + 1));
      up    = 1'($urandom);
      down  = 1'($urandom);
      if (i % 1000 < 200) begin up = 1'b1; down = 1'b0; end      // run to MAX
      else if (i % 1000 < 400) begin up = 1'b0; down = 1'b1; end // run to 0
      if (clr) model = 0;
      else if (load) model = int'(value);
      else if (up && !down) begin if (model == MAX) sat_hi++; else model++; end
      else if (down && !up) begin if (model == 0) sat_lo++; else model--; end
    end
    checks++;
    if (sat_lo == 0 || sat_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
