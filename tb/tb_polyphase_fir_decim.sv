// tb_polyphase_fir_decim: self-checking test of the polyphase FIR decimator.
// Three instances share the clock and the valid pattern:
//   dut_c  default: the 52-tap, decimate-by-4 CIC compensator (22-bit in/out)
//   dut_f  the 51-tap, decimate-by-2 final lowpass as used in the chain
//          (22-bit in, 16-bit out, shift 21 to remove the CIC gain)
//   dut_s  a small filter (7 taps, decimate by 3, 10-bit output) that
//          saturates often, with coefficients not a multiple of DECIM long
// The reference is a direct-form convolution y[m] = sum_j h[j] x[mD+D-1-j],
// rounded half up and clipped, computed with 64-bit integers. Output values,
// the sat flag, the output count and the latency (out_valid 3 cycles after
// the in_valid of sample mD+D-1) are checked; both clipping directions and
// unclipped outputs must occur.
module tb_polyphase_fir_decim;
  import cic_comp_pkg::*;
  localparam int N = 6000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid;
  logic signed [21:0] in_c;   // shared by dut_c and dut_f
  logic signed [11:0] in_s;
  logic ov_c, ov_f, ov_s, sat_c, sat_f, sat_s;
  logic signed [21:0] out_c;
  logic signed [15:0] out_f;
  logic signed [9:0]  out_s;
  int checks = 0, failures = 0;

  localparam logic signed [7:0] SCOEF [7] = '{-3, 10, 40, 90, 40, 10, -3};

  polyphase_fir_decim dut_c (.clk, .rst_n, .in_valid, .in_data(in_c),
                             .out_valid(ov_c), .out_data(out_c), .sat(sat_c));
  polyphase_fir_decim #(.TAPS(FINAL_TAPS), .DECIM(FINAL_DECIM), .IN_W(22), .OUT_W(16),
                        .CW(16), .SHIFT(21), .COEF(FINAL_COEF))
    dut_f (.clk, .rst_n, .in_valid, .in_data(in_c),
           .out_valid(ov_f), .out_data(out_f), .sat(sat_f));
  polyphase_fir_decim #(.TAPS(7), .DECIM(3), .IN_W(12), .OUT_W(10), .CW(8),
                        .SHIFT(6), .COEF(SCOEF))
    dut_s (.clk, .rst_n, .in_valid, .in_data(in_s),
           .out_valid(ov_s), .out_data(out_s), .sat(sat_s));

  initial begin : watchdog
    repeat (4 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xc [N], xs [N], t_in [N];
  longint hc [], hf [], hs [];
  longint cycle = 0;
  int nin = 0;
  int nout [3] = '{0, 0, 0};
  int nsat_hi = 0, nsat_lo = 0, nplain = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic void ref_out(input longint x [N], input longint h [], input int d,
                                  input int m, input int shift, input int ow,
                                  output longint y, output bit s);
    longint acc = 0, mx, mn;
    int last = m * d + d - 1;
    for (int j = 0; j < h.size(); j++) if (last - j >= 0) acc += h[j] * x[last - j];
    y = (acc + (longint'(1) <<< (shift - 1))) >>> shift;
    mx = (longint'(1) <<< (ow - 1)) - 1;
    mn = -(longint'(1) <<< (ow - 1));
    s = 1'b0;
    if (y > mx) begin y = mx; s = 1'b1; end
    if (y < mn) begin y = mn; s = 1'b1; end
  endfunction

  task automatic check(input int which, input longint got, input bit gsat,
                       input longint x [N], input longint h [], input int d,
                       input int shift, input int ow);
    longint y;
    bit s;
    int m = nout[which];
    ref_out(x, h, d, m, shift, ow, y, s);
    checks++;
    if (got != y || gsat != s) begin
      failures++;
      if (failures < 10) $display("dut %0d out %0d: got %0d/%0d exp %0d/%0d", which, m, got, gsat, y, s);
    end
    checks++;
    if (cycle - t_in[m * d + d - 1] != 3) begin
      failures++;
      if (failures < 10) $display("dut %0d out %0d: latency %0d", which, m, cycle - t_in[m * d + d - 1]);
    end
    if (which == 2) begin
      if (s && y > 0) nsat_hi++;
      else if (s) nsat_lo++;
      else nplain++;
    end
    nout[which]++;
  endtask

  always @(negedge clk) if (rst_n) begin
    if (ov_c) check(0, longint'(out_c), sat_c, xc, hc, 4, 15, 22);
    if (ov_f) check(1, longint'(out_f), sat_f, xc, hf, 2, 21, 16);
    if (ov_s) check(2, longint'(out_s), sat_s, xs, hs, 3, 6, 10);
  end

  initial begin
    hc = new[COMP_TAPS];  foreach (hc[i]) hc[i] = longint'(COMP_COEF[i]);
    hf = new[FINAL_TAPS]; foreach (hf[i]) hf[i] = longint'(FINAL_COEF[i]);
    hs = new[7];          foreach (hs[i]) hs[i] = longint'(SCOEF[i]);
    in_valid = 1'b0; in_c = '0; in_s = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (nin < N) begin
      @(negedge clk);
      in_valid = (nin < N / 2) ? 1'b1 : (($urandom % 3) != 0);
      if ((nin / 500) % 2 == 0) begin
        in_c = 22'($urandom);
        in_s = 12'($urandom);
      end else begin
        // slow square wave at full scale: drives the outputs into clipping
        in_c = ((nin / 40) % 2 == 0) ? 22'sh1fffff : -22'sh200000;
        in_s = ((nin / 12) % 2 == 0) ? 12'sh7ff : -12'sh800;
      end
      if (in_valid) begin
        xc[nin] = longint'(in_c);
        xs[nin] = longint'(in_s);
        t_in[nin] = cycle;
        nin++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    checks += 3;
    if (nout[0] != N / 4) begin failures++; $display("dut_c outputs %0d", nout[0]); end
    if (nout[1] != N / 2) begin failures++; $display("dut_f outputs %0d", nout[1]); end
    if (nout[2] != N / 3) begin failures++; $display("dut_s outputs %0d", nout[2]); end
    checks++;
    if (nsat_hi == 0 || nsat_lo == 0 || nplain == 0) begin
      failures++;
      $display("clipping not exercised: hi=%0d lo=%0d plain=%0d", nsat_hi, nsat_lo, nplain);
    end
    $display("clip hi=%0d lo=%0d plain=%0d", nsat_hi, nsat_lo, nplain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
