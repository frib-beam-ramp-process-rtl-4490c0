// fp_div: single-precision floating-point divider, one clock latency.
//
// Divides the dividend mantissa, shifted up by 24 places, by the divisor
// mantissa; the 25-bit quotient is normalised by at most one place and
// truncated (round toward zero). A zero dividend gives zero; a zero divisor
// saturates to the largest finite value, which makes an envelope built
// from it permissive rather than faulting. Results below the normal range
// flush to zero. in_valid reaches out_valid one clock later with y.
// The operator is named by the checker's design; the insides are this
// design's own.
module fp_div
  import ramp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,          // dividend
  input  fp32_t b,          // divisor
  output logic  out_valid,
  output fp32_t y
);

  fp32_t res;

  always_comb begin
    logic [47:0] num;
    logic [23:0] den;
    logic [47:0] q;
    logic signed [10:0] e;
    logic [22:0] f;
    num = {1'b1, a[22:0], 24'd0};
    den = {1'b1, b[22:0]};
    q   = num / {24'd0, den};           // in [2^23, 2^25)
    e   = $signed({3'b0, a[30:23]}) - $signed({3'b0, b[30:23]}) + 11'sd127;
    if (q[24]) begin
      f = q[23:1];
    end else begin
      f = q[22:0];
      e = e - 11'sd1;
    end
    if (a[30:23] == 8'd0)
      res = 32'd0;
    else if (b[30:23] == 8'd0 || e >= 11'sd255)
      res = {a[31] ^ b[31], 8'hFE, 23'h7FFFFF};
    else if (e <= 11'sd0)
      res = 32'd0;
    else
      res = {a[31] ^ b[31], e[7:0], f};
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
