// tb_cic_decimator: self-checking test of the CIC decimator at its default
// size (16-bit input, K = 8, P = 2, 22-bit data path).
// The expected output is computed directly as a convolution with the CIC
// impulse response h (K ones convolved P times), taken at input samples
// mK + K - 1, with no recursion and no wrap-around. The input mixes random
// samples, full-scale runs (the integrators wrap, the output must still be
// exact and reach the extreme value K^P * full scale) and random gaps in
// in_valid. out_valid must come exactly 2P clocks after the in_valid of
// sample mK + K - 1, and there must be one output per K inputs.
module tb_cic_decimator;
  localparam int IN_W = 16, K = 8, P = 2;
  localparam int W = IN_W + P * $clog2(K);
  localparam int HL = P * (K - 1) + 1;
  localparam int N = 24000;
  localparam longint GAIN = 64;   // K^P

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   in_valid, out_valid;
  logic signed [IN_W-1:0] in_data;
  logic signed [W-1:0]    out_data;
  int checks = 0, failures = 0, wraps = 0, outputs = 0, extremes = 0;

  cic_decimator dut (.*);

  initial begin : watchdog
    repeat (4 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [HL];
  longint x [N];
  longint t_in [N];
  int     nin = 0;
  longint cycle = 0;
  longint s1 = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // impulse response: P-fold convolution of K ones
  initial begin
    longint tmp [HL];
    for (int j = 0; j < HL; j++) h[j] = (j < K) ? 1 : 0;
    for (int p = 1; p < P; p++) begin
      for (int j = 0; j < HL; j++) begin
        tmp[j] = 0;
        for (int i = 0; i < K; i++) if (j - i >= 0) tmp[j] += h[j - i];
      end
      h = tmp;
    end
  end

  // output checker
  always @(negedge clk) if (rst_n && out_valid) begin
    int     last;
    longint e;
    last = outputs * K + K - 1;
    e = 0;
    for (int j = 0; j < HL; j++) if (last - j >= 0) e += h[j] * x[last - j];
    checks++;
    if (longint'(out_data) != e) begin
      failures++;
      if (failures < 10) $display("output %0d: got %0d exp %0d", outputs, out_data, e);
    end
    checks++;
    if (cycle - t_in[last] != 2 * P) begin
      failures++;
      if (failures < 10) $display("output %0d: latency %0d", outputs, cycle - t_in[last]);
    end
    if (e == GAIN * 32767 || e == -GAIN * 32768) extremes++;
    outputs++;
  end

  initial begin
    in_valid = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (nin < N) begin
      @(negedge clk);
      in_valid = (($urandom % 5) != 0);
      case ((nin / 1500) % 4)
        0, 2: in_data = IN_W'($urandom);
        1: in_data = 16'sh7fff;
        default: in_data = -16'sh8000;
      endcase
      if (in_valid) begin
        x[nin] = longint'(in_data);
        t_in[nin] = cycle;   // cycle in which in_valid is high
        s1 += longint'(in_data);
        if (s1 > longint'(2 ** (W - 1)) - 1 || s1 < -longint'(2 ** (W - 1))) begin
          wraps++;
          s1 = 0;
        end
        nin++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (outputs != N / K) begin failures++; $display("outputs %0d, expected %0d", outputs, N / K); end
    checks++;
    if (wraps == 0) begin failures++; $display("first integrator never wrapped"); end
    checks++;
    if (extremes == 0) begin failures++; $display("full-scale output never reached"); end
    $display("outputs=%0d wraps=%0d extremes=%0d", outputs, wraps, extremes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
