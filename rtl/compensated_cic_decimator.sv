// compensated_cic_decimator: narrow-band decimate-by-64 filter made of a
// multiplierless CIC decimator and two polyphase FIR decimators.
//
//   in (16 b, rate fs)
//     -> cic_decimator      K = 8, P = 2      (22 b, gain 64, rate fs/8)
//     -> polyphase_fir_decim 52 taps, /4      CIC droop compensator
//                                             (22 b, unity gain, rate fs/32)
//     -> polyphase_fir_decim 51 taps, /2      final lowpass, removes the
//                                             CIC gain of 64 (16 b, fs/64)
//     -> out
//
// The CIC does the bulk of the rate reduction at the high rate with adders
// only. The FIR stages run at the reduced rates, so the chain needs only
// 103 coefficient multiplications per output sample (2.42 per input sample).
// Overall DC gain is one. The stage split (8*4*2), the two CIC sections and
// the tap counts follow the published architecture. The coefficient values,
// the word widths, the rounding and saturation, and the valid-strobe
// interface are this design's own.
//
// Interface: one clock; in_valid marks an input sample (every clock or with
// gaps). out_valid pulses once per 64 input samples, 10 clock cycles after
// the in_valid of input sample 64m+63 (counted from reset). cic_* and comp_* bring
// out the intermediate streams at fs/8 and fs/32. sat pulses with a
// compensator or final-stage output sample that had to be clipped.
// Assertions check that no decimated stream is valid in two consecutive
// clocks.
module compensated_cic_decimator
  import cic_comp_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [SAMPLE_IN_W-1:0] in_data,
  output logic                        out_valid,
  output logic signed [SAMPLE_OUT_W-1:0] out_data,
  output logic                        sat,
  output logic                        cic_valid,
  output logic signed [CIC_OUT_W-1:0] cic_data,
  output logic                        comp_valid,
  output logic signed [CIC_OUT_W-1:0] comp_data
);

  logic comp_sat, final_sat;

  cic_decimator #(.IN_W(SAMPLE_IN_W), .K(CIC_K), .P(CIC_P), .W(CIC_OUT_W)) u_cic (
    .clk, .rst_n,
    .in_valid, .in_data,
    .out_valid(cic_valid), .out_data(cic_data)
  );

  polyphase_fir_decim #(
    .TAPS(COMP_TAPS), .DECIM(COMP_DECIM), .IN_W(CIC_OUT_W), .OUT_W(CIC_OUT_W),
    .CW(COEF_W), .SHIFT(COEF_FRAC), .COEF(COMP_COEF)
  ) u_comp (
    .clk, .rst_n,
    .in_valid(cic_valid), .in_data(cic_data),
    .out_valid(comp_valid), .out_data(comp_data), .sat(comp_sat)
  );

  // the final stage also divides by the CIC gain K^P = 2^(P*log2 K)
  polyphase_fir_decim #(
    .TAPS(FINAL_TAPS), .DECIM(FINAL_DECIM), .IN_W(CIC_OUT_W), .OUT_W(SAMPLE_OUT_W),
    .CW(COEF_W), .SHIFT(COEF_FRAC + CIC_P * $clog2(CIC_K)), .COEF(FINAL_COEF)
  ) u_final (
    .clk, .rst_n,
    .in_valid(comp_valid), .in_data(comp_data),
    .out_valid, .out_data, .sat(final_sat)
  );

  assign sat = comp_sat | final_sat;

  // Stream rules: every stage decimates by at least 2, so no decimated
  // stream may carry samples in two consecutive clocks (reset clears every
  // valid flag, so the rules hold during reset too).
  a_cic_spacing:  assert property (@(posedge clk) cic_valid  |=> !cic_valid);
  a_comp_spacing: assert property (@(posedge clk) comp_valid |=> !comp_valid);
  a_out_spacing:  assert property (@(posedge clk) out_valid  |=> !out_valid);

endmodule
