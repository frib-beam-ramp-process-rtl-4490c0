// fp_add: single-precision floating-point adder/subtractor, one clock latency.
//
// Computes a + b (sub = 0) or a - b (sub = 1). Operands are aligned on a
// 48-bit mantissa datapath, added or subtracted, renormalised with a
// leading-one search and truncated (round toward zero). Zero and denormal
// inputs are read as zero and results below the normal range flush to zero;
// NaN and infinity are not handled because the checker's values are finite.
// in_valid is carried to out_valid together with the result one clock later.
// The operator itself is named by the checker's design; its insides here
// are a plain textbook implementation.
module fp_add
  import ramp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  sub,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  fp32_t res;

  always_comb begin
    logic        sa, sb, sbig, ssml;
    logic [7:0]  ea, eb, ebig, esml;
    logic [23:0] ma, mb, mbig, msml;
    logic [47:0] big, sml;
    logic [48:0] sum;
    logic [7:0]  d;
    int          lead;
    logic signed [10:0] e_res;
    logic [48:0] norm;

    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    if ({ea, ma} >= {eb, mb}) begin
      sbig = sa; ebig = ea; mbig = ma; ssml = sb; esml = eb; msml = mb;
    end else begin
      sbig = sb; ebig = eb; mbig = mb; ssml = sa; esml = ea; msml = ma;
    end
    d   = ebig - esml;
    big = {mbig, 24'd0};
    sml = (d > 8'd47) ? 48'd0 : ({msml, 24'd0} >> d);
    if (sbig == ssml) sum = {1'b0, big} + {1'b0, sml};
    else              sum = {1'b0, big} - {1'b0, sml};
    e_res = '0;
    norm  = '0;
    lead = -1;
    for (int i = 0; i < 49; i++) if (sum[i]) lead = i;
    res = 32'd0;
    if (lead >= 0) begin
      e_res = $signed({3'b0, ebig}) + 11'(lead - 47);
      norm  = sum << (48 - lead);             // leading one to bit 48
      if (e_res > 11'sd0 && e_res < 11'sd255)
        res = {sbig, e_res[7:0], norm[47:25]};
      else if (e_res >= 11'sd255)
        res = {sbig, 8'hFE, 23'h7FFFFF};      // saturate
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
