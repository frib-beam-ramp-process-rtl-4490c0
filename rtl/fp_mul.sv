// fp_mul: single-precision floating-point multiplier, one clock latency.
//
// Multiplies the two 24-bit mantissas into a 48-bit product, normalises by at
// most one place and truncates (round toward zero). Zero inputs give zero,
// results below the normal range flush to zero and results above it
// saturate to the largest finite value. in_valid reaches out_valid one
// clock later together with y. The operator is named by the checker's
// design; the insides are this design's own.
module fp_mul
  import ramp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  fp32_t res;

  always_comb begin
    logic [23:0] ma, mb;
    logic [47:0] p;
    logic signed [10:0] e;
    logic [22:0] f;
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    p  = ma * mb;
    e  = $signed({3'b0, a[30:23]}) + $signed({3'b0, b[30:23]}) - 11'sd127;
    if (p[47]) begin
      f = p[46:24];
      e = e + 11'sd1;
    end else begin
      f = p[45:23];
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0 || e <= 11'sd0)
      res = 32'd0;
    else if (e >= 11'sd255)
      res = {a[31] ^ b[31], 8'hFE, 23'h7FFFFF};
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
