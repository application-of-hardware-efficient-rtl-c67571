// tb_cic_integrator: self-checking test of one CIC integrator section.
// Random samples (with long full-scale runs, so the accumulator wraps many
// times) arrive with random gaps. A reference accumulator reduced modulo
// 2^W gives the expected output; out_valid must follow in_valid by exactly
// one clock. The test also requires that the unbounded running sum left
// the W-bit range at least once (wrap-around exercised).
module tb_cic_integrator;
  localparam int W = 22;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid, out_valid;
  logic signed [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, wraps = 0;

  cic_integrator #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model;
  logic         exp_valid;
  longint       true_sum;

  initial begin
    in_valid = 1'b0; in_data = '0; model = '0; exp_valid = 1'b0; true_sum = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid || out_data !== signed'(model)) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d got %0d/%0d exp %0d/%0d",
                                    n, out_valid, out_data, exp_valid, signed'(model));
      end
      in_valid = ($urandom % 4) != 0;
      case ((n / 2000) % 3)
        0: in_data = W'($signed($urandom));
        1: in_data = {1'b0, {(W-1){1'b1}}};          // largest positive
        default: in_data = {1'b1, {(W-1){1'b0}}};    // most negative
      endcase
      if (in_valid) begin
        model    = model + in_data;
        true_sum = true_sum + longint'(in_data);
        if (true_sum > longint'(2**(W-1) - 1) || true_sum < -longint'(2**(W-1))) begin
          wraps++;
          true_sum = longint'(signed'(model));
        end
      end
      exp_valid = in_valid;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("accumulator never wrapped"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
