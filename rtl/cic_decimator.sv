// cic_decimator: P-section cascaded integrator-comb decimator, decimation K,
// H(z) = ((1 - z^-K) / (1 - z^-1))^P, built without multipliers.
//
// Structure (input rate on the left, rate K times lower on the right):
//   P x cic_integrator -> down-sampler (rate_divider enable) -> P x cic_comb
// The integrators run on every valid input sample. The rate divider lets
// every K-th integrator output through to the combs, which therefore run at
// the low rate; the comb delay of K input samples becomes a single
// low-rate register (differential delay 1). Every section is registered,
// one adder or subtractor between registers.
//
// Register growth: the data path is W = IN_W + P*ceil(log2 K) bits wide
// everywhere (22 bits for 16-bit input, K = 8, P = 2), enough for the gain
// K^P. Integrators wrap modulo 2^W; the combs undo the wrap, so the output
// is exact. The output carries the full gain K^P (64 for the defaults);
// later stages scale it.
//
// Timing: out_valid pulses once per K valid inputs, exactly 2*P clock
// cycles after in_valid of input sample number mK + K - 1 (counted from 0
// after reset), and out_data is then sum_j h[j] * x[mK + K - 1 - j] with h
// the P-fold convolution of K ones. in_valid may be high every clock or not.
module cic_decimator #(
  parameter int unsigned IN_W = 16,
  parameter int unsigned K    = 8,
  parameter int unsigned P    = 2,
  parameter int unsigned W    = IN_W + P * $clog2(K)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic signed [W-1:0]    out_data
);

  logic               int_valid [P+1];
  logic signed [W-1:0] int_data [P+1];
  logic               comb_valid [P+1];
  logic signed [W-1:0] comb_data [P+1];
  logic               tick;

  assign int_valid[0] = in_valid;
  assign int_data[0]  = W'(in_data);   // sign-extended

  for (genvar s = 0; s < P; s++) begin : g_int
    cic_integrator #(.W(W)) u_int (
      .clk, .rst_n,
      .in_valid (int_valid[s]),   .in_data (int_data[s]),
      .out_valid(int_valid[s+1]), .out_data(int_data[s+1])
    );
  end

  // down-sampler: keep one integrator output in K
  rate_divider #(.K(K)) u_div (
    .clk, .rst_n, .en(int_valid[P]), .tick
  );

  assign comb_valid[0] = tick;
  assign comb_data[0]  = int_data[P];

  for (genvar s = 0; s < P; s++) begin : g_comb
    cic_comb #(.W(W)) u_comb (
      .clk, .rst_n,
      .in_valid (comb_valid[s]),   .in_data (comb_data[s]),
      .out_valid(comb_valid[s+1]), .out_data(comb_data[s+1])
    );
  end

  assign out_valid = comb_valid[P];
  assign out_data  = comb_data[P];

  initial assert (W >= IN_W + P * $clog2(K))
    else $error("cic_decimator: W too narrow for the CIC gain K^P");

endmodule
