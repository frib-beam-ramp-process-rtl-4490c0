// micro_checker: pulse-level check of the beam gate during the cold-start
// ramp. Every pulse's width (PW) and cycle are compared with a max/min
// envelope worked out ahead of the pulse.
//
// The envelope for a pulse is computed while the pulse before it runs
// ("next" registers) and becomes "current" at the pulse's rising edge:
//  * at each MC start (calc_mc) the first pulse of the MC is predicted to
//    start after the notch;
//  * at each pulse start the following pulse is predicted to start one
//    maximum cycle later.
// micro_dsp gives the raw cycle and PW bounds (Eqs. 1-5) for the predicted
// step time, look_ahead decides maintain/extend/shrink from the time left
// in the MC and widens the bounds. In the transition period and at full
// power the envelope comes straight from configuration; in IDLE nothing is
// checked. Two range_checkers raise tw_fault / tc_fault: above max while
// counting (one clock later), below min at the done strobe.
// The two-level structure (DSP plus look-ahead), the equations and the
// fault rules follow the design; the trigger points and the prediction of
// the next pulse's start time are this design's choices.
module micro_checker
  import ramp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  stage_e            stage,
  input  logic [TIME_W-1:0] step_time,
  input  logic              calc_mc,
  input  logic              clr,
  input  logic              pulse_start,
  input  logic [CNT_W-1:0]  tw_count,
  input  logic              tw_active,
  input  logic              tw_rdy,
  input  logic [CNT_W-1:0]  tw_last,
  input  logic [CNT_W-1:0]  tc_count,
  input  logic              tc_active,
  input  logic              tc_rdy,
  input  logic [CNT_W-1:0]  tc_last,
  input  logic [CNT_W-1:0]  mc_time,
  output logic              exp_valid,
  output la_e               cur_la,
  output logic [CNT_W-1:0]  tc_max_exp,
  output logic [CNT_W-1:0]  tc_min_exp,
  output logic [CNT_W-1:0]  tw_max_exp,
  output logic [CNT_W-1:0]  tw_min_exp,
  output logic              tw_fault,
  output logic              tc_fault,
  output logic              tw_fault_evt,
  output logic              tc_fault_evt
);

  logic ramp;
  logic [1:0] sidx;
  assign ramp = (stage == ST_STEP1) || (stage == ST_STEP2) ||
                (stage == ST_STEP3) || (stage == ST_STEP4);
  assign sidx = 2'(stage - ST_STEP1);

  // ---------------- DSP trigger ----------------
  logic              pend;
  logic [TIME_W-1:0] trig_time;
  logic [CNT_W-1:0]  trig_left;
  logic              dsp_busy, dsp_done, dsp_start;
  logic [CNT_W-1:0]  d_cmax, d_cmin, d_pwmax1, d_pwmax2, d_pwmin;
  logic [CNT_W-1:0]  nxt_cmax_raw;
  logic [CNT_W-1:0]  mc_left;

  assign mc_left   = sat_sub(cfg.t_mc, mc_time);
  assign dsp_start = pend && !dsp_busy;

  micro_dsp u_dsp (
    .clk, .rst_n, .start(dsp_start), .freq_mode(stage == ST_STEP1),
    .step_time(trig_time), .rate(cfg.step[sidx].rate), .init(cfg.step[sidx].init),
    .hold((stage == ST_STEP1) ? cfg.pw_const : cfg.prf_const), .tol_f(cfg.tol_f),
    .left(trig_left), .busy(dsp_busy), .done(dsp_done),
    .cmax(d_cmax), .cmin(d_cmin), .pwmax1(d_pwmax1), .pwmax2(d_pwmax2), .pwmin(d_pwmin));

  la_e              la_dec;
  logic [CNT_W-1:0] la_tc_max, la_tc_min, la_tw_max, la_tw_min;

  look_ahead u_la (
    .left(trig_left), .notch(cfg.notch), .cyc_step(cfg.cyc_step), .tol_w(cfg.tol_w),
    .pw_start(cfg.pw_start), .cmax(d_cmax), .cmin(d_cmin), .pwmax1(d_pwmax1),
    .pwmax2(d_pwmax2), .pwmin(d_pwmin), .la(la_dec), .tc_max(la_tc_max),
    .tc_min(la_tc_min), .tw_max(la_tw_max), .tw_min(la_tw_min));

  // ---------------- next / current envelopes ----------------
  logic             nxt_valid;
  la_e              nxt_la;
  logic [CNT_W-1:0] nxt_tc_max, nxt_tc_min, nxt_tw_max, nxt_tw_min;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; trig_time <= '0; trig_left <= '0;
      nxt_valid <= 1'b0; nxt_la <= LA_MAINTAIN; nxt_cmax_raw <= '0;
      nxt_tc_max <= '0; nxt_tc_min <= '0; nxt_tw_max <= '0; nxt_tw_min <= '0;
      exp_valid <= 1'b0; cur_la <= LA_MAINTAIN;
      tc_max_exp <= '0; tc_min_exp <= '0; tw_max_exp <= '0; tw_min_exp <= '0;
    end else begin
      if (dsp_start) pend <= 1'b0;

      if (calc_mc) begin
        // first pulse of the MC starts after the notch
        nxt_valid <= 1'b0;
        pend      <= ramp;
        trig_time <= step_time + TIME_W'(cfg.notch);
        trig_left <= sat_sub(cfg.t_mc, cfg.notch);
      end else if (pulse_start && ramp) begin
        // following pulse starts about one maximum cycle later
        nxt_valid <= 1'b0;
        pend      <= 1'b1;
        trig_time <= step_time + TIME_W'(nxt_cmax_raw);
        trig_left <= sat_sub(mc_left, nxt_cmax_raw);
      end else if (dsp_done) begin
        nxt_valid    <= 1'b1;
        nxt_la       <= la_dec;
        nxt_cmax_raw <= d_cmax;
        nxt_tc_max   <= la_tc_max;
        nxt_tc_min   <= la_tc_min;
        nxt_tw_max   <= la_tw_max;
        nxt_tw_min   <= la_tw_min;
      end

      if (stage == ST_TRANS || stage == ST_FULL) begin
        exp_valid  <= 1'b1;
        cur_la     <= LA_MAINTAIN;
        tc_max_exp <= (stage == ST_TRANS) ? cfg.env_trans.tc_max : cfg.env_full.tc_max;
        tc_min_exp <= (stage == ST_TRANS) ? cfg.env_trans.tc_min : cfg.env_full.tc_min;
        tw_max_exp <= (stage == ST_TRANS) ? cfg.env_trans.tw_max : cfg.env_full.tw_max;
        tw_min_exp <= (stage == ST_TRANS) ? cfg.env_trans.tw_min : cfg.env_full.tw_min;
      end else if (!ramp) begin
        exp_valid <= 1'b0;
      end else if (pulse_start) begin
        exp_valid    <= nxt_valid;
        cur_la       <= nxt_la;
        tc_max_exp   <= nxt_tc_max;
        tc_min_exp   <= nxt_tc_min;
        tw_max_exp   <= nxt_tw_max;
        tw_min_exp   <= nxt_tw_min;
      end
    end
  end

  range_checker u_tw (
    .clk, .rst_n, .clr, .exp_valid, .active(tw_active), .count(tw_count),
    .done(tw_rdy), .done_count(tw_last), .max_exp(tw_max_exp), .min_exp(tw_min_exp),
    .fault(tw_fault), .fault_evt(tw_fault_evt), .over(), .under());

  range_checker u_tc (
    .clk, .rst_n, .clr, .exp_valid, .active(tc_active), .count(tc_count),
    .done(tc_rdy), .done_count(tc_last), .max_exp(tc_max_exp), .min_exp(tc_min_exp),
    .fault(tc_fault), .fault_evt(tc_fault_evt), .over(), .under());

endmodule
