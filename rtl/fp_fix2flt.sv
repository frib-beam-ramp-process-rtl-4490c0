// fp_fix2flt: unsigned fixed-point to single-precision floating-point
// converter, one clock latency.
//
// x is an unsigned number with `frac` fraction bits (frac is a run-time
// input so one converter serves integer counts and fixed-point rates). The
// leading one sets the exponent, the bits below it form the mantissa, and
// anything beyond 23 bits is truncated. x = 0 gives +0.0. The DSPs use it
// for cycle time, ramp rate and step initial values, as the design's
// converter block does; the insides are this design's own.
module fp_fix2flt
  import ramp_pkg::*;
#(
  parameter int unsigned IN_W = 48
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [IN_W-1:0] x,
  input  logic [5:0]      frac,
  output logic            out_valid,
  output fp32_t           y
);

  fp32_t res;

  always_comb begin
    int lead;
    logic [IN_W-1:0] norm;
    logic [23:0] m;
    logic signed [10:0] e;
    norm = '0;
    m    = '0;
    e    = '0;
    lead = -1;
    for (int i = 0; i < int'(IN_W); i++) if (x[i]) lead = i;
    res = 32'd0;
    if (lead >= 0) begin
      norm = x << (IN_W - 1 - lead);           // leading one to the top bit
      m    = 24'(norm >> (IN_W - 24));
      e    = 11'sd127 + 11'(lead) - $signed({5'b0, frac});
      res  = (e > 11'sd0) ? {1'b0, e[7:0], m[22:0]} : 32'd0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= res;
    end
  end

endmodule
