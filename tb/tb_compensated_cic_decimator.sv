// tb_compensated_cic_decimator: end-to-end test of the decimate-by-64 chain
// at its full default size (the top has no parameters).
// A bit-exact reference model of the chain, written as plain convolutions
// (CIC impulse response, then each FIR with rounding and clipping), gives
// the expected value of every sample of the three output streams: CIC
// (fs/8), compensator (fs/32) and final output (fs/64). The input runs
// through three segments: full-scale random noise with a sample every
// clock, a full-scale square wave (its step overshoot makes the FIR stages
// clip, raising sat), and random samples with random gaps in in_valid.
// Checked: every sample, the sat flag, one output per 64 inputs, and the
// latency of 10 cycles from the in_valid of sample 64m+63 to out_valid.
// Each mechanism (integrator wrap-around, each decimation stage, clipping,
// input gaps) is counted and must have happened at least once.
module tb_compensated_cic_decimator;
  import cic_comp_pkg::*;
  localparam int N   = 64 * 480;
  localparam int HL  = CIC_P * (CIC_K - 1) + 1;
  localparam int CW_ = CIC_OUT_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                           in_valid, out_valid, sat, cic_valid, comp_valid;
  logic signed [SAMPLE_IN_W-1:0]  in_data;
  logic signed [SAMPLE_OUT_W-1:0] out_data;
  logic signed [CW_-1:0]          cic_data, comp_data;

  compensated_cic_decimator dut (.*);

  int checks = 0, failures = 0;
  int n_wrap = 0, n_cic = 0, n_comp = 0, n_out = 0, n_sat = 0, n_gap = 0;

  initial begin : watchdog
    repeat (3 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint x [N], t_in [N];
  longint yc [N / 8], yp [N / 32];
  bit     sp [N / 32];
  longint h [HL];
  longint cycle = 0;
  int nin = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint clip(input longint v, input int w, output bit s);
    longint mx = (longint'(1) <<< (w - 1)) - 1;
    longint mn = -(longint'(1) <<< (w - 1));
    s = 1'b0;
    if (v > mx) begin s = 1'b1; return mx; end
    if (v < mn) begin s = 1'b1; return mn; end
    return v;
  endfunction

  function automatic longint rnd(input longint acc, input int sh);
    return (acc + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  task automatic fail(input string what, input int m, input longint got, input longint e);
    failures++;
    if (failures < 12) $display("%s %0d: got %0d exp %0d", what, m, got, e);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (cic_valid) begin
      longint e;
      int last;
      e = 0;
      last = n_cic * CIC_K + CIC_K - 1;
      for (int j = 0; j < HL; j++) if (last - j >= 0) e += h[j] * x[last - j];
      yc[n_cic] = e;
      checks++;
      if (longint'(cic_data) != e) fail("cic", n_cic, longint'(cic_data), e);
      n_cic++;
    end
    if (comp_valid) begin
      longint acc, e;
      bit s;
      int last;
      acc = 0;
      last = n_comp * COMP_DECIM + COMP_DECIM - 1;
      for (int j = 0; j < COMP_TAPS; j++)
        if (last - j >= 0) acc += longint'(COMP_COEF[j]) * yc[last - j];
      e = clip(rnd(acc, COEF_FRAC), CW_, s);
      yp[n_comp] = e;
      sp[n_comp] = s;
      checks++;
      if (longint'(comp_data) != e) fail("comp", n_comp, longint'(comp_data), e);
      n_comp++;
    end
    if (out_valid) begin
      longint acc, e;
      bit s;
      int last;
      acc = 0;
      last = n_out * FINAL_DECIM + FINAL_DECIM - 1;
      for (int j = 0; j < FINAL_TAPS; j++)
        if (last - j >= 0) acc += longint'(FINAL_COEF[j]) * yp[last - j];
      e = clip(rnd(acc, COEF_FRAC + CIC_P * $clog2(CIC_K)), SAMPLE_OUT_W, s);
      checks++;
      if (longint'(out_data) != e) fail("out", n_out, longint'(out_data), e);
      // sat reports clipping in either FIR stage for this output sample
      checks++;
      if (sat !== s) fail("sat", n_out, longint'(sat), longint'(s));
      checks++;
      if (cycle - t_in[n_out * 64 + 63] != 10)
        fail("latency", n_out, cycle - t_in[n_out * 64 + 63], 10);
      n_out++;
    end
    if (sat) n_sat++;
  end

  initial begin
    longint s1;
    s1 = 0;
    for (int j = 0; j < HL; j++) begin
      int v;
      v = (j < int'(CIC_K)) ? j + 1 : 2 * int'(CIC_K) - 1 - j;  // triangle, P = 2
      h[j] = longint'(v);
    end
    in_valid = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (nin < N) begin
      @(negedge clk);
      if (nin < N / 3) begin
        in_valid = 1'b1;
        in_data  = SAMPLE_IN_W'($urandom);
      end else if (nin < 2 * N / 3) begin
        in_valid = 1'b1;
        in_data  = ((nin / 2048) % 2 == 0) ? 16'sh7fff : -16'sh8000;
      end else begin
        in_valid = ($urandom % 4) != 0;
        in_data  = SAMPLE_IN_W'($urandom) >>> 2;
      end
      if (!in_valid) n_gap++;
      if (in_valid) begin
        x[nin] = longint'(in_data);
        t_in[nin] = cycle;
        s1 += longint'(in_data);
        if (s1 > longint'(2 ** (CW_ - 1)) - 1 || s1 < -longint'(2 ** (CW_ - 1))) begin
          n_wrap++;
          s1 = 0;
        end
        nin++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (16) @(negedge clk);
    checks++;
    if (n_out != N / 64) begin failures++; $display("outputs %0d, expected %0d", n_out, N / 64); end
    checks++;
    if (n_cic != N / 8 || n_comp != N / 32) begin failures++; $display("stage counts %0d %0d", n_cic, n_comp); end
    $display("mechanisms: wrap=%0d cic=%0d comp=%0d out=%0d sat=%0d gaps=%0d",
             n_wrap, n_cic, n_comp, n_out, n_sat, n_gap);
    checks += 6;
    if (n_wrap == 0) begin failures++; $display("integrator wrap never happened"); end
    if (n_cic == 0)  begin failures++; $display("CIC decimation never happened"); end
    if (n_comp == 0) begin failures++; $display("compensator decimation never happened"); end
    if (n_out == 0)  begin failures++; $display("final decimation never happened"); end
    if (n_sat == 0)  begin failures++; $display("clipping never happened"); end
    if (n_gap == 0)  begin failures++; $display("input gaps never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
