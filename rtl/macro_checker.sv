// macro_checker: machine-cycle-level check of the accumulated beam-on time
// (BT) during the cold-start ramp.
//
// At every MC start (calc_mc) in ramp steps 1-4 it starts macro_dsp, which
// returns the BT envelope of the MC now beginning about 0.52 us later; the
// first MC of a step re-initialises the DSP's PRF and PW (S1). A
// range_checker then raises bt_fault one clock after the running BT count
// passes the maximum, or at the end of the MC (mc_rdy) if the total is
// below the minimum. Outside the ramp steps nothing is checked. The check
// is slow by nature: a short MC is only seen when it ends. Structure and
// fault rules follow the design; restricting the check to steps 1-4 is
// this design's choice.
module macro_checker
  import ramp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  input  stage_e           stage,
  input  logic             calc_mc,
  input  logic             first_mc,
  input  logic             clr,
  input  logic [CNT_W-1:0] bt_count,
  input  logic             mc_rdy,
  input  logic [CNT_W-1:0] bt_last,
  output logic             exp_valid,
  output logic [CNT_W-1:0] bt_max_exp,
  output logic [CNT_W-1:0] bt_min_exp,
  output logic             bt_fault,
  output logic             bt_fault_evt
);

  logic ramp;
  logic [1:0] sidx;
  logic dsp_busy, dsp_done;

  assign ramp = (stage == ST_STEP1) || (stage == ST_STEP2) ||
                (stage == ST_STEP3) || (stage == ST_STEP4);
  assign sidx = 2'(stage - ST_STEP1);

  macro_dsp u_dsp (
    .clk, .rst_n, .start(calc_mc && ramp), .init_step(first_mc), .t_mc(cfg.t_mc),
    .t_beam(sat_sub(cfg.t_mc, cfg.notch)),
    .rate(cfg.step[sidx].rate), .init(cfg.step[sidx].init),
    .hold((stage == ST_STEP1) ? cfg.pw_const : cfg.prf_const),
    .e_tol(cfg.step[sidx].bt_tol), .busy(dsp_busy), .done(dsp_done),
    .bt_max(bt_max_exp), .bt_min(bt_min_exp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        exp_valid <= 1'b0;
    else if (calc_mc)  exp_valid <= 1'b0;
    else if (dsp_done) exp_valid <= 1'b1;
  end

  range_checker u_bt (
    .clk, .rst_n, .clr, .exp_valid, .active(1'b1), .count(bt_count),
    .done(mc_rdy), .done_count(bt_last), .max_exp(bt_max_exp), .min_exp(bt_min_exp),
    .fault(bt_fault), .fault_evt(bt_fault_evt), .over(), .under());

endmodule
