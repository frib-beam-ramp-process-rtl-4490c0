// fp_flt2fix: single-precision floating-point to unsigned integer converter,
// one clock latency.
//
// Rounds to the nearest integer (halves round up). Negative values give 0
// and values of 2^32 or more saturate to 32'hFFFF_FFFF, so a min envelope
// that goes below zero becomes 0 and never faults. Used to turn the DSP
// results into clock counts the counters are compared with. The converter
// is named by the checker's design; the insides are this design's own.
module fp_flt2fix
  import ramp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  fp32_t       a,
  output logic        out_valid,
  output logic [31:0] y
);

  logic [31:0] res;

  always_comb begin
    logic signed [10:0] sh;
    logic [63:0] v;
    sh  = $signed({3'b0, a[30:23]}) - 11'sd150;   // value = m * 2^sh
    res = 32'd0;
    v   = 64'd0;
    if (a[31] || a[30:23] == 8'd0) begin
      res = 32'd0;
    end else if (sh >= 11'sd9) begin
      res = 32'hFFFF_FFFF;
    end else if (sh >= 11'sd0) begin
      v   = {40'd0, 1'b1, a[22:0]} << sh;
      res = v[31:0];
    end else if (sh >= -11'sd25) begin
      v   = ({39'd0, 1'b1, a[22:0], 1'b0} >> (-sh)) + 64'd1;  // +half LSB
      res = v[32:1];
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
