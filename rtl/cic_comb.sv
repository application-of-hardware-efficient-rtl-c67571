// cic_comb: one comb (differentiator) section of a CIC decimator,
// H(z) = 1 - z^-1 at the decimated rate (differential delay 1).
//
// Runs at the low rate: it acts only on the samples marked valid, which the
// rate divider lets through once every K input samples. It keeps the
// previous valid input in a delay register and outputs the registered
// difference one clock after the input, so each section has a single
// subtractor between registers. Arithmetic wraps modulo 2^W, undoing the
// wrap of the integrators.
//
// Reset clears the delay and output registers (a choice of this design).
module cic_comb #(
  parameter int unsigned W = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  logic signed [W-1:0] delay_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delay_q   <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        delay_q  <= in_data;
        out_data <= in_data - delay_q;
      end
    end
  end

endmodule
