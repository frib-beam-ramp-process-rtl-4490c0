// ramp_checker_top: beam ramp process checker of the chopper monitor.
//
// Watches the beam gate pulses while the chopper ramps beam power up after a
// restart, and trips the beam (beam_off) as soon as a pulse or a machine
// cycle (MC) leaves the expected envelope. Blocks, all on one 80.5 MHz
// clock:
//   pulse_counter  - PW, cycle and MC beam-on time (BT) counters
//   micro_checker  - per-pulse PW and cycle check (micro DSP + look-ahead)
//   macro_checker  - per-MC BT check (macro DSP)
//   ramp_control   - registers, stage timer, records for DDR3
// The embedded processor (register port), the two DDR3 memories (record
// streams) and the GTS event receiver (gate and MC tick) are outside this
// module; their connections are ports. Faults are sticky until cleared
// through the register port; beam_off is their OR, registered.
module ramp_checker_top
  import ramp_pkg::*;
(
  input  logic        clk,          // 80.5 MHz
  input  logic        rst_n,
  // beam gate observations and machine-cycle tick
  input  logic        gate_gts,
  input  logic        gate_hv,
  input  logic        gate_cp,
  input  logic        mc_tick,
  // processor register port
  input  logic        cfg_we,
  input  logic [7:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  // machine protection
  output logic        beam_off,
  output logic [2:0]  faults,       // {bt, tc, tw}, sticky
  output logic [2:0]  fault_evt,    // {bt, tc, tw}, one clock per detection
  output logic [15:0] dropped,      // records lost to a busy DDR3 port
  output stage_e      stage,
  // DDR3 record streams: 0 pulse records, 1 MC records
  output rec_t        rec0,
  output logic        rec0_valid,
  input  logic        rec0_ready,
  output rec_t        rec1,
  output logic        rec1_valid,
  input  logic        rec1_ready
);

  cfg_t              cfg;
  logic [1:0]        src_sel;
  logic              clr_faults;
  logic [TIME_W-1:0] step_time;
  logic              calc_mc, first_mc;
  logic [31:0]       mc_index;

  logic             gate, pulse_start;
  logic [CNT_W-1:0] tw_count, tw_last, tc_count, tc_last, bt_count, bt_last, mc_time;
  logic             tw_active, tw_rdy, tc_active, tc_rdy, mc_rdy;

  logic             mi_valid, ma_valid;
  la_e              cur_la;
  logic [CNT_W-1:0] tc_max_exp, tc_min_exp, tw_max_exp, tw_min_exp, bt_max_exp, bt_min_exp;
  logic             tw_fault, tc_fault, bt_fault, tw_evt, tc_evt, bt_evt;

  pulse_counter u_cnt (
    .clk, .rst_n, .gate_gts, .gate_hv, .gate_cp, .src_sel, .mc_tick,
    .gate, .pulse_start, .tw_count, .tw_active, .tw_rdy, .tw_last,
    .tc_count, .tc_active, .tc_rdy, .tc_last, .bt_count, .mc_rdy, .bt_last, .mc_time);

  micro_checker u_micro (
    .clk, .rst_n, .cfg, .stage, .step_time, .calc_mc, .clr(clr_faults),
    .pulse_start, .tw_count, .tw_active, .tw_rdy, .tw_last,
    .tc_count, .tc_active, .tc_rdy, .tc_last, .mc_time,
    .exp_valid(mi_valid), .cur_la, .tc_max_exp, .tc_min_exp, .tw_max_exp, .tw_min_exp,
    .tw_fault, .tc_fault, .tw_fault_evt(tw_evt), .tc_fault_evt(tc_evt));

  macro_checker u_macro (
    .clk, .rst_n, .cfg, .stage, .calc_mc, .first_mc, .clr(clr_faults),
    .bt_count, .mc_rdy, .bt_last, .exp_valid(ma_valid),
    .bt_max_exp, .bt_min_exp, .bt_fault, .bt_fault_evt(bt_evt));

  assign faults    = {bt_fault, tc_fault, tw_fault};
  assign fault_evt = {bt_evt, tc_evt, tw_evt};

  ramp_control u_ctl (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg, .src_sel, .clr_faults,
    .mc_tick, .stage, .step_time, .calc_mc, .first_mc, .mc_index,
    .tc_rdy, .tc_last, .tw_last, .tc_max_exp, .tc_min_exp, .tw_max_exp, .tw_min_exp,
    .la(cur_la), .mc_rdy, .bt_last, .bt_max_exp, .bt_min_exp, .faults,
    .rec0, .rec0_valid, .rec0_ready, .rec1, .rec1_valid, .rec1_ready, .dropped);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) beam_off <= 1'b0;
    else        beam_off <= tw_fault || tc_fault || bt_fault;
  end

endmodule
