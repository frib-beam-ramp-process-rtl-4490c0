// ramp_pkg: shared types and constants of the beam ramp process checker.
//
// The checker runs from one 80.5 MHz clock; every time quantity (pulse width,
// pulse cycle, machine-cycle length, beam-on time) is a count of that clock.
// Arithmetic inside the two DSPs is IEEE-754 single precision (fp32_t).
// Ramp rates are unsigned fixed point with RATE_FRAC fraction bits
// (Hz/s for the frequency ramp, clock counts per second for the width ramp).
//
// Ramp stages follow the cold-start sequence: step 1 ramps the pulse
// repetition frequency (PRF) at constant pulse width (PW); steps 2 to 4 ramp
// the PW at constant PRF; a transition period and the full-power pulse follow.
// The configuration record, register map and DDR3 record layouts are this
// design's own choice.
package ramp_pkg;

  localparam int unsigned CLK_HZ    = 80_500_000;   // counter/pipeline clock
  localparam int unsigned CNT_W     = 32;           // width of every count
  localparam int unsigned TIME_W    = 40;           // step timer (393.6 s fits)
  localparam int unsigned RATE_FRAC = 8;            // fraction bits of rates
  localparam int unsigned N_STEPS   = 4;            // linear ramp steps

  typedef logic [31:0] fp32_t;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_STEP1 = 3'd1,   // PRF ramp, PW constant
    ST_STEP2 = 3'd2,   // PW ramps, PRF constant
    ST_STEP3 = 3'd3,
    ST_STEP4 = 3'd4,
    ST_TRANS = 3'd5,   // 25 kHz / 12.5 kHz interleave before full power
    ST_FULL  = 3'd6    // full power pulse
  } stage_e;

  // Look-ahead decision for the next pulse.
  typedef enum logic [1:0] {
    LA_MAINTAIN = 2'd0,
    LA_EXTEND   = 2'd1,
    LA_SHRINK   = 2'd2
  } la_e;

  // Per ramp step settings.
  typedef struct packed {
    logic [31:0] init;     // start value: PRF in Hz (step 1) or PW in counts
    logic [31:0] rate;     // ramp rate, fixed point with RATE_FRAC fraction bits
    logic [31:0] dur_mc;   // duration of the step in machine cycles
    logic [31:0] bt_tol;   // macro checker tolerance E, beam-on counts per second
  } step_cfg_t;

  // Fixed max/min envelope used where no ramp equation applies.
  typedef struct packed {
    logic [31:0] tc_max;
    logic [31:0] tc_min;
    logic [31:0] tw_max;
    logic [31:0] tw_min;
  } env_cfg_t;

  typedef struct packed {
    step_cfg_t [N_STEPS-1:0] step;     // index 0 = step 1
    logic [31:0] prf_const;  // PRF in Hz held during steps 2-4
    logic [31:0] pw_const;   // PW in counts held during step 1
    logic [31:0] pw_start;   // start PW, value a cut-back pulse falls to
    logic [31:0] tol_f;      // PRF tolerance in Hz
    logic [31:0] tol_w;      // PW tolerance in counts
    logic [31:0] cyc_step;   // pulse cycle ramp step size in counts
    logic [31:0] t_mc;       // machine-cycle length in counts
    logic [31:0] notch;      // diagnostic notch length in counts
    logic [31:0] trans_mc;   // transition period length in machine cycles
    env_cfg_t    env_trans;  // micro envelope during the transition period
    env_cfg_t    env_full;   // micro envelope at full power
  } cfg_t;

  // Register map of the configuration port (word addresses).
  localparam logic [7:0] A_CTRL = 8'h00; // [0] enable ramp, [1] clear faults, [2] source sel lo, [3] hi
  localparam logic [7:0] A_STEP_BASE = 8'h10; // 0x10 + 4*step + {init,rate,dur_mc,bt_tol}
  localparam logic [7:0] A_PRF_CONST = 8'h20;
  localparam logic [7:0] A_PW_CONST = 8'h21;
  localparam logic [7:0] A_PW_START = 8'h22;
  localparam logic [7:0] A_TOL_F = 8'h23;
  localparam logic [7:0] A_TOL_W = 8'h24;
  localparam logic [7:0] A_CYC_STEP = 8'h25;
  localparam logic [7:0] A_T_MC = 8'h26;
  localparam logic [7:0] A_NOTCH = 8'h27;
  localparam logic [7:0] A_TRANS_MC = 8'h28;
  localparam logic [7:0] A_ENV_TRANS = 8'h30; // +{tc_max,tc_min,tw_max,tw_min}
  localparam logic [7:0] A_ENV_FULL = 8'h34;
  localparam logic [7:0] A_STATUS = 8'h40; // read: stage, faults
  localparam logic [7:0] A_MC_COUNT = 8'h41; // read: MCs since ramp start

  // Record written to DDR3 for every pulse (micro) or machine cycle (macro),
  // 128 bits. Counts are kept to 20 bits (a 10 ms MC is 805000 clocks) and
  // saturate at 2^20-1. An MC record has no look-ahead decision and no
  // second envelope: its la, max_b and min_b fields are always zero.
  localparam int unsigned REC_CNT_W = 20;
  typedef struct packed {
    logic [2:0]  stage;
    logic [2:0]  faults;    // {bt, tc, tw}
    logic [1:0]  la;        // look-ahead decision of the pulse
    logic [REC_CNT_W-1:0] cnt_a;  // pulse: cycle count;  MC: beam-on count
    logic [REC_CNT_W-1:0] max_a;
    logic [REC_CNT_W-1:0] min_a;
    logic [REC_CNT_W-1:0] cnt_b;  // pulse: PW count;     MC: MC index
    logic [REC_CNT_W-1:0] max_b;
    logic [REC_CNT_W-1:0] min_b;
  } rec_t;

  function automatic logic [REC_CNT_W-1:0] sat20(input logic [31:0] v);
    return (v[31:REC_CNT_W] != '0) ? '1 : v[REC_CNT_W-1:0];
  endfunction

  function automatic logic [31:0] sat_sub(input logic [31:0] a, input logic [31:0] b);
    return (a > b) ? a - b : 32'd0;
  endfunction

  function automatic logic [31:0] sat_add(input logic [31:0] a, input logic [31:0] b);
    logic [32:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[32] ? 32'hFFFF_FFFF : s[31:0];
  endfunction

endpackage
