// tb_cic_comb: self-checking test of one CIC comb section.
// Random samples with random gaps; expected output is the difference of
// the two most recent valid inputs, modulo 2^W (so the wrap of a difference
// of extreme values is checked too), one clock after in_valid.
module tb_cic_comb;
  localparam int W = 22;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid, out_valid;
  logic signed [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, wraps = 0;

  cic_comb #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] prev, expv;
  logic         exp_valid;
  longint       true_diff;

  initial begin
    in_valid = 1'b0; in_data = '0; prev = '0; expv = '0; exp_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid || (exp_valid && out_data !== signed'(expv))) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d got %0d/%0d exp %0d/%0d",
                                    n, out_valid, out_data, exp_valid, signed'(expv));
      end
      in_valid = ($urandom % 3) != 0;
      in_data  = W'($signed($urandom));
      if (in_valid) begin
        expv      = in_data - prev;
        true_diff = longint'(in_data) - longint'(signed'(prev));
        if (true_diff != longint'(signed'(expv))) wraps++;
        prev = in_data;
      end
      exp_valid = in_valid;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrapping difference seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
