// look_ahead: decides whether the next pulse keeps, extends or shrinks its
// cycle near the end of a machine cycle (MC), and turns the DSP results into
// the final max/min envelope the counters are checked against.
//
// left is the time, in clocks, from the predicted start of the next pulse to
// the end of the MC. With avail = left - notch:
//  * avail >= 2*cmax: both look-ahead pulses fit, the cycle is maintained;
//    envelope cycle [cmin, cmax], PW [pwmin, pwmax1] (Eqs. 3, 5).
//  * cmax <= avail < 2*cmax: the first pulse fits but the second does not,
//    so the first is extended to reach the MC end; cycle up to left, PW up to
//    pwmax2 = PW * left / cmin (Eq. 4).
//  * avail < cmax: the pulse does not fit; its cycle runs to the MC end and
//    its PW may be cut back to the start PW.
// The cycle bounds are then widened by the cycle ramp step size and the PW
// bounds by the PW tolerance. Purely combinational. The three cases and the
// PW rules follow the design; widening each case to an envelope that also
// holds the unchanged pulse is this design's choice.
module look_ahead
  import ramp_pkg::*;
(
  input  logic [CNT_W-1:0] left,
  input  logic [CNT_W-1:0] notch,
  input  logic [CNT_W-1:0] cyc_step,
  input  logic [CNT_W-1:0] tol_w,
  input  logic [CNT_W-1:0] pw_start,
  input  logic [CNT_W-1:0] cmax,
  input  logic [CNT_W-1:0] cmin,
  input  logic [CNT_W-1:0] pwmax1,
  input  logic [CNT_W-1:0] pwmax2,
  input  logic [CNT_W-1:0] pwmin,
  output la_e              la,
  output logic [CNT_W-1:0] tc_max,
  output logic [CNT_W-1:0] tc_min,
  output logic [CNT_W-1:0] tw_max,
  output logic [CNT_W-1:0] tw_min
);

  logic [CNT_W-1:0] avail;
  logic [CNT_W:0]   two_cmax;

  assign avail    = sat_sub(left, notch);
  assign two_cmax = {cmax, 1'b0};

  always_comb begin
    if ({1'b0, avail} >= two_cmax) begin
      la     = LA_MAINTAIN;
      tc_max = sat_add(cmax, cyc_step);
      tc_min = sat_sub(cmin, cyc_step);
      tw_max = sat_add(pwmax1, tol_w);
      tw_min = sat_sub(pwmin, tol_w);
    end else if (avail >= cmax) begin
      la     = LA_EXTEND;
      tc_max = sat_add(left, cyc_step);
      tc_min = sat_sub(cmin, cyc_step);
      tw_max = sat_add(pwmax2, tol_w);
      tw_min = sat_sub(pwmin, tol_w);
    end else begin
      la     = LA_SHRINK;
      tc_max = sat_add((left > cmax) ? left : cmax, cyc_step);
      tc_min = sat_sub((left < cmin) ? left : cmin, cyc_step);
      tw_max = sat_add(pwmax1, tol_w);
      tw_min = sat_sub(pw_start, tol_w);
    end
  end

endmodule
