// tb_passband_response: measures the magnitude response of the whole
// decimate-by-64 chain with sine inputs, at the frequencies of a passband
// droop chart (0.02 ... 0.45 of the output Nyquist frequency) and at two
// stopband frequencies (0.6 and 0.8).
// For each frequency a sine of amplitude 16000 LSB is fed for a settling
// time, then 400 output samples are correlated with a sine and a cosine at
// the output-rate frequency (an integer number of periods fits in 400
// samples). The gain in dB is compared with the response of the quantised
// coefficient sets computed offline:
//   H(f) = |H_CIC(f)| * |H_comp(f)| * |H_final(f)|,
//   H_CIC(f) = |sin(pi f K) / (K sin(pi f))|^P,  f in cycles per input sample,
//   H_x(f)   = |sum_j h_x[j] exp(-i 2 pi f D_x j)| / 2^15  (D_x: input
//              rate reduction in front of that stage).
// Passband points must be within 0.05 dB of it, the band-edge points within
// 0.1 dB, and stopband points below -50 dB.
module tb_passband_response;
  import cic_comp_pkg::*;
  localparam int NF = 10;
  localparam int M = 400;        // output samples measured per frequency
  localparam int SETTLE = 48;    // output samples skipped per frequency
  localparam real AMP = 16000.0;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                           in_valid, out_valid, sat, cic_valid, comp_valid;
  logic signed [SAMPLE_IN_W-1:0]  in_data;
  logic signed [SAMPLE_OUT_W-1:0] out_data;
  logic signed [CIC_OUT_W-1:0]    cic_data, comp_data;

  compensated_cic_decimator dut (.*);

  int checks = 0, failures = 0;

  // fraction of the output Nyquist frequency, expected gain in dB
  real fr [NF] = '{0.02, 0.10, 0.15, 0.20, 0.25, 0.30, 0.40, 0.45, 0.60, 0.80};
  real gexp [NF] = '{-0.0045, -0.0257, 0.0002, -0.0203, -0.0207, -0.0326,
                     -3.0597, -8.1743, -56.17, -55.33};

  initial begin : watchdog
    repeat (NF * (M + SETTLE + 4) * 64 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real acc_i, acc_q, fo;
  int  nout, cur;
  bit  measuring;

  always @(negedge clk) if (rst_n && out_valid) begin
    if (measuring && nout >= SETTLE && nout < SETTLE + M) begin
      acc_i += real'(out_data) * $cos(2.0 * PI * fo * real'(nout));
      acc_q += real'(out_data) * $sin(2.0 * PI * fo * real'(nout));
    end
    nout++;
  end

  initial begin
    real fin, amp, gdb, tol;
    in_valid = 1'b0; in_data = '0; measuring = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (cur = 0; cur < NF; cur++) begin
      fin = fr[cur] * 0.5 / 64.0;      // cycles per input sample
      fo  = fin * 64.0;                // cycles per output sample
      acc_i = 0.0; acc_q = 0.0; nout = 0; measuring = 1'b1;
      for (int n = 0; n < (SETTLE + M) * 64; n++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = SAMPLE_IN_W'($rtoi($floor(AMP * $sin(2.0 * PI * fin * real'(n)) + 0.5)));
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (12) @(negedge clk);
      measuring = 1'b0;
      amp = 2.0 * $sqrt(acc_i * acc_i + acc_q * acc_q) / real'(M);
      gdb = 20.0 * $log10(amp / AMP + 1.0e-12);
      checks++;
      if (gexp[cur] < -40.0) begin
        if (gdb > -50.0) failures++;
        $display("f=%0.2f  gain %8.3f dB  (limit -50 dB)", fr[cur], gdb);
      end else begin
        tol = (fr[cur] > 0.35) ? 0.1 : 0.05;
        if (gdb > gexp[cur] + tol || gdb < gexp[cur] - tol) failures++;
        $display("f=%0.2f  gain %8.4f dB  (expected %8.4f)", fr[cur], gdb, gexp[cur]);
      end
      // restart the chain from rest for the next frequency
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
