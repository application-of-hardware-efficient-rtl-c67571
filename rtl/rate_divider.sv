// rate_divider: divides the sample rate by K (the CIC "clock divider").
//
// Counts valid samples at the high rate and raises tick together with every
// K-th one (combinationally, in the same cycle as that sample's en), so the
// down-sampler passes samples K-1, 2K-1, ... counted from reset. The design
// uses a single clock: instead of a divided clock it produces this enable,
// which gates the low-rate logic that follows.
module rate_divider #(
  parameter int unsigned K = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic en,
  output logic tick
);

  localparam int unsigned CW = $clog2(K+1);
  localparam logic [CW-1:0] LAST = CW'(K - 1);

  logic [CW-1:0] phase;   // samples already seen in the current group

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         phase <= '0;
    else if (en) begin
      if (phase == LAST) phase <= '0;
      else               phase <= phase + 1'b1;
    end
  end

  assign tick = en && (phase == LAST);

  initial assert (K >= 1) else $error("rate_divider: K must be at least 1");

endmodule
