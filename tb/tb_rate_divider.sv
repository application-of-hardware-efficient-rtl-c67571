// tb_rate_divider: self-checking test of the rate divider at K = 8 (the
// default) and K = 3. With random enables, tick must be high exactly with
// the enables numbered K-1, 2K-1, ... since reset, i.e. one tick per K.
module tb_rate_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en8, en3, tick8, tick3;
  int checks = 0, failures = 0, ticks8 = 0, ticks3 = 0;
  int cnt8 = 0, cnt3 = 0;

  rate_divider            dut8 (.clk, .rst_n, .en(en8), .tick(tick8));
  rate_divider #(.K(3))   dut3 (.clk, .rst_n, .en(en3), .tick(tick3));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en8 = 1'b0; en3 = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      en8 = ($urandom % 3) != 0;
      en3 = ($urandom % 2) != 0;
      #1;
      checks += 2;
      if (tick8 !== (en8 && (cnt8 % 8 == 7))) begin
        failures++;
        if (failures < 10) $display("K=8 tick wrong at n=%0d", n);
      end
      if (tick3 !== (en3 && (cnt3 % 3 == 2))) begin
        failures++;
        if (failures < 10) $display("K=3 tick wrong at n=%0d", n);
      end
      if (en8) cnt8++;
      if (en3) cnt3++;
      if (tick8) ticks8++;
      if (tick3) ticks3++;
    end
    checks += 2;
    if (ticks8 != cnt8 / 8) failures++;
    if (ticks3 != cnt3 / 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
