// polyphase_fir_decim: FIR decimator in polyphase form, decimation DECIM,
// TAPS coefficients h[0..TAPS-1].
//
// y[m] = sum_j h[j] * x[m*DECIM + DECIM - 1 - j]
//
// The filter is split into DECIM branches; branch k holds the coefficients
// h[k], h[k+DECIM], h[k+2*DECIM], ... and a delay line of its own. An input
// commutator hands each valid input sample to one branch, going from branch
// DECIM-1 down to branch 0 (the first sample after reset goes to branch
// DECIM-1). So every delay line shifts once per DECIM inputs, and nothing
// is computed for the outputs that decimation throws away: one product per
// tap (TAPS multipliers) and TAPS-1 additions per output sample. Used with
// the default parameters, after the CIC decimator, it is the CIC
// compensation filter; with the final coefficient set, the last
// decimate-by-2 lowpass.
// The polyphase form and the one-multiplier-per-tap cost follow the
// published architecture; the commutator start, the rounding and the
// saturation are choices of this design.
//
// Timing: in the clock cycle after branch 0 receives its sample, all branch
// products are summed into a full-precision accumulator register; the next
// register holds the rounded and saturated result. out_valid is high 3
// clock cycles after the cycle in which in_valid of input sample
// m*DECIM + DECIM - 1 was high.
// Scaling: out = round(acc / 2^SHIFT) (round half up), clipped to OUT_W
// bits; sat pulses with out_valid when the value was clipped. Inputs may
// arrive every clock.
module polyphase_fir_decim #(
  parameter int unsigned TAPS  = cic_comp_pkg::COMP_TAPS,
  parameter int unsigned DECIM = cic_comp_pkg::COMP_DECIM,
  parameter int unsigned IN_W  = cic_comp_pkg::CIC_OUT_W,
  parameter int unsigned OUT_W = cic_comp_pkg::CIC_OUT_W,
  parameter int unsigned CW    = cic_comp_pkg::COEF_W,
  parameter int unsigned SHIFT = cic_comp_pkg::COEF_FRAC,
  parameter logic signed [CW-1:0] COEF [TAPS] = cic_comp_pkg::COMP_COEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    sat
);

  localparam int unsigned SUB = (TAPS + DECIM - 1) / DECIM; // taps per branch
  localparam int unsigned AW  = IN_W + CW + $clog2(TAPS);   // accumulator
  localparam int unsigned BW  = (DECIM > 1) ? $clog2(DECIM) : 1;

  typedef logic signed [AW-1:0] acc_t;

  localparam acc_t OUT_MAX = acc_t'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam acc_t OUT_MIN = -acc_t'(64'sd1 <<< (OUT_W - 1));
  localparam acc_t HALF    = acc_t'(64'sd1 <<< (SHIFT - 1));

  // coefficient of branch k, position i; zero beyond the last tap
  function automatic acc_t coef_at(int unsigned k, int unsigned i);
    int unsigned idx;
    idx = k + i * DECIM;
    if (idx < TAPS) return acc_t'(COEF[idx]);
    return '0;
  endfunction

  logic signed [IN_W-1:0] branch_q [DECIM][SUB];
  logic [BW-1:0]          comm_q;       // branch that takes the next sample
  logic                   fire_q;       // branch 0 was just loaded
  acc_t                   acc_q;
  logic                   acc_valid_q;
  acc_t                   sum;
  acc_t                   scaled;

  // input commutator and branch delay lines
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comm_q <= BW'(DECIM - 1);
      fire_q <= 1'b0;
      for (int k = 0; k < int'(DECIM); k++)
        for (int i = 0; i < int'(SUB); i++)
          branch_q[k][i] <= '0;
    end else begin
      fire_q <= in_valid && (comm_q == '0);
      if (in_valid) begin
        for (int k = 0; k < int'(DECIM); k++) begin
          if (comm_q == BW'(k)) begin
            for (int i = int'(SUB) - 1; i > 0; i--)
              branch_q[k][i] <= branch_q[k][i-1];
            branch_q[k][0] <= in_data;
          end
        end
        comm_q <= (comm_q == '0) ? BW'(DECIM - 1) : comm_q - 1'b1;
      end
    end
  end

  // branch filters and output adder: one multiplier per tap
  always_comb begin
    sum = '0;
    for (int k = 0; k < int'(DECIM); k++)
      for (int i = 0; i < int'(SUB); i++)
        sum += acc_t'(branch_q[k][i]) * coef_at(k, i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q       <= '0;
      acc_valid_q <= 1'b0;
    end else begin
      acc_valid_q <= fire_q;
      if (fire_q) acc_q <= sum;
    end
  end

  // rounding and saturation
  assign scaled = (acc_q + HALF) >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
      sat       <= 1'b0;
    end else begin
      out_valid <= acc_valid_q;
      sat       <= 1'b0;
      if (acc_valid_q) begin
        if (scaled > OUT_MAX) begin
          out_data <= OUT_MAX[OUT_W-1:0];
          sat      <= 1'b1;
        end else if (scaled < OUT_MIN) begin
          out_data <= OUT_MIN[OUT_W-1:0];
          sat      <= 1'b1;
        end else begin
          out_data <= scaled[OUT_W-1:0];
        end
      end
    end
  end

  initial assert (SHIFT >= 1 && SHIFT < AW && OUT_W <= AW)
    else $error("polyphase_fir_decim: bad SHIFT/OUT_W");

endmodule
