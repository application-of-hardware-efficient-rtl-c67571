// cic_integrator: one integrator section of a CIC decimator, H(z) = 1/(1 - z^-1).
//
// Runs at the high (input) sample rate. Each valid input sample is added to
// the accumulator; the accumulator is the registered output, so a cascade of
// these sections has exactly one adder between registers (pipelined CIC).
// The sum wraps modulo 2^W: with W = input bits + P*log2(K) the combs that
// follow remove the wrap exactly (two's-complement CIC property), so no
// overflow detection is wanted here.
//
// Interface: in_valid/in_data from the previous section, out_valid/out_data
// one clock later. out_data holds the accumulator between valid samples.
// Reset clears the accumulator (a choice of this design).
module cic_integrator #(
  parameter int unsigned W = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= out_data + in_data;
    end
  end

endmodule
