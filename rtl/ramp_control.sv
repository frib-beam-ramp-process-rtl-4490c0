// ramp_control: configuration registers, ramp stage timer, fault clear and
// the packing of measurement records for the two DDR3 memories.
//
// Registers: a 32-bit word port (cfg_we/cfg_addr/cfg_wdata, combinational
// cfg_rdata) from the embedded processor sets every checker parameter; the
// map is in ramp_pkg. Reset values are the cold-start ramp of the design:
// 2 kHz -> 25 kHz in 30 s, then PW 0.6 -> 5 -> 20 -> 39.4 us, 10 ms MC,
// 50 us notch, tolerances as in the lab test. Writing A_CTRL bit 1 clears
// the sticky faults.
// Stage timer: stages change only at MC ticks. With enable set the ramp
// starts at the next tick, each step lasts its dur_mc MCs, the transition
// period trans_mc MCs, then full power holds. step_time counts clocks since
// the current stage began. One clock after every tick calc_mc pulses (with
// first_mc on the first MC of a stage) to start the checker DSPs.
// Records: one per pulse (at tc_rdy) to port 0 and one per MC (at mc_rdy)
// to port 1, as 128-bit rec_t words with valid/ready. An MC record carries
// the stage and index of the MC that ended, not of the one just begun.
// Each port holds one record; a record arriving while the previous one is
// still waiting is dropped and counted. Timer-driven stage valids, configuration from the processor and
// packing data to two DDR3 memories follow the design; the register map,
// record layout and one-record buffers are this design's choices.
module ramp_control
  import ramp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // configuration port
  input  logic              cfg_we,
  input  logic [7:0]        cfg_addr,
  input  logic [31:0]       cfg_wdata,
  output logic [31:0]       cfg_rdata,
  output cfg_t              cfg,
  output logic [1:0]        src_sel,
  output logic              clr_faults,
  // timing
  input  logic              mc_tick,
  output stage_e            stage,
  output logic [TIME_W-1:0] step_time,
  output logic              calc_mc,
  output logic              first_mc,
  output logic [31:0]       mc_index,
  // measurement inputs
  input  logic              tc_rdy,
  input  logic [CNT_W-1:0]  tc_last,
  input  logic [CNT_W-1:0]  tw_last,
  input  logic [CNT_W-1:0]  tc_max_exp,
  input  logic [CNT_W-1:0]  tc_min_exp,
  input  logic [CNT_W-1:0]  tw_max_exp,
  input  logic [CNT_W-1:0]  tw_min_exp,
  input  la_e               la,
  input  logic              mc_rdy,
  input  logic [CNT_W-1:0]  bt_last,
  input  logic [CNT_W-1:0]  bt_max_exp,
  input  logic [CNT_W-1:0]  bt_min_exp,
  input  logic [2:0]        faults,      // {bt, tc, tw}
  // DDR3 record streams
  output rec_t              rec0,
  output logic              rec0_valid,
  input  logic              rec0_ready,
  output rec_t              rec1,
  output logic              rec1_valid,
  input  logic              rec1_ready,
  output logic [15:0]       dropped
);

  logic enable;

  function automatic cfg_t cfg_default();
    cfg_t c;
    c = '0;
    c.step[0] = '{init: 32'd2000, rate: 32'd197120, dur_mc: 32'd3000,  bt_tol: 32'd40000};
    c.step[1] = '{init: 32'd49,   rate: 32'd3091,   dur_mc: 32'd3000,  bt_tol: 32'd55000};
    c.step[2] = '{init: 32'd403,  rate: 32'd7831,   dur_mc: 32'd4000,  bt_tol: 32'd190000};
    c.step[3] = '{init: 32'd1610, rate: 32'd1016,   dur_mc: 32'd39360, bt_tol: 32'd555000};
    c.prf_const = 32'd25000;
    c.pw_const  = 32'd49;
    c.pw_start  = 32'd49;
    c.tol_f     = 32'd100;
    c.tol_w     = 32'd10;
    c.cyc_step  = 32'd4000;
    c.t_mc      = 32'd805000;
    c.notch     = 32'd4025;
    c.trans_mc  = 32'd30;
    c.env_trans = '{tc_max: 32'd17000, tc_min: 32'd0, tw_max: 32'd17000, tw_min: 32'd0};
    c.env_full  = '{tc_max: 32'd809000, tc_min: 32'd796975, tw_max: 32'd800985, tw_min: 32'd39};
    return c;
  endfunction

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= cfg_default();
      enable     <= 1'b0;
      src_sel    <= 2'd0;
      clr_faults <= 1'b0;
    end else begin
      clr_faults <= 1'b0;
      if (cfg_we) begin
        if (cfg_addr == A_CTRL) begin
          enable     <= cfg_wdata[0];
          clr_faults <= cfg_wdata[1];
          src_sel    <= cfg_wdata[3:2];
        end else if (cfg_addr >= A_STEP_BASE && cfg_addr < A_STEP_BASE + 8'd16) begin
          unique case (cfg_addr[1:0])
            2'd0: cfg.step[cfg_addr[3:2]].init   <= cfg_wdata;
            2'd1: cfg.step[cfg_addr[3:2]].rate   <= cfg_wdata;
            2'd2: cfg.step[cfg_addr[3:2]].dur_mc <= cfg_wdata;
            default: cfg.step[cfg_addr[3:2]].bt_tol <= cfg_wdata;
          endcase
        end else begin
          case (cfg_addr)
            A_PRF_CONST: cfg.prf_const <= cfg_wdata;
            A_PW_CONST:  cfg.pw_const  <= cfg_wdata;
            A_PW_START:  cfg.pw_start  <= cfg_wdata;
            A_TOL_F:     cfg.tol_f     <= cfg_wdata;
            A_TOL_W:     cfg.tol_w     <= cfg_wdata;
            A_CYC_STEP:  cfg.cyc_step  <= cfg_wdata;
            A_T_MC:      cfg.t_mc      <= cfg_wdata;
            A_NOTCH:     cfg.notch     <= cfg_wdata;
            A_TRANS_MC:  cfg.trans_mc  <= cfg_wdata;
            A_ENV_TRANS:        cfg.env_trans.tc_max <= cfg_wdata;
            A_ENV_TRANS + 8'd1: cfg.env_trans.tc_min <= cfg_wdata;
            A_ENV_TRANS + 8'd2: cfg.env_trans.tw_max <= cfg_wdata;
            A_ENV_TRANS + 8'd3: cfg.env_trans.tw_min <= cfg_wdata;
            A_ENV_FULL:         cfg.env_full.tc_max  <= cfg_wdata;
            A_ENV_FULL + 8'd1:  cfg.env_full.tc_min  <= cfg_wdata;
            A_ENV_FULL + 8'd2:  cfg.env_full.tw_max  <= cfg_wdata;
            A_ENV_FULL + 8'd3:  cfg.env_full.tw_min  <= cfg_wdata;
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    cfg_rdata = 32'd0;
    if (cfg_addr >= A_STEP_BASE && cfg_addr < A_STEP_BASE + 8'd16) begin
      unique case (cfg_addr[1:0])
        2'd0: cfg_rdata = cfg.step[cfg_addr[3:2]].init;
        2'd1: cfg_rdata = cfg.step[cfg_addr[3:2]].rate;
        2'd2: cfg_rdata = cfg.step[cfg_addr[3:2]].dur_mc;
        default: cfg_rdata = cfg.step[cfg_addr[3:2]].bt_tol;
      endcase
    end else begin
      case (cfg_addr)
        A_CTRL:      cfg_rdata = {28'd0, src_sel, 1'b0, enable};
        A_PRF_CONST: cfg_rdata = cfg.prf_const;
        A_PW_CONST:  cfg_rdata = cfg.pw_const;
        A_PW_START:  cfg_rdata = cfg.pw_start;
        A_TOL_F:     cfg_rdata = cfg.tol_f;
        A_TOL_W:     cfg_rdata = cfg.tol_w;
        A_CYC_STEP:  cfg_rdata = cfg.cyc_step;
        A_T_MC:      cfg_rdata = cfg.t_mc;
        A_NOTCH:     cfg_rdata = cfg.notch;
        A_TRANS_MC:  cfg_rdata = cfg.trans_mc;
        A_STATUS:    cfg_rdata = {16'd0, dropped[7:0], 2'd0, faults, stage};
        A_MC_COUNT:  cfg_rdata = mc_index;
        default:     cfg_rdata = 32'd0;
      endcase
    end
  end

  // ---------------- stage timer ----------------
  logic [31:0] mc_in_stage;
  logic [31:0] stage_len;
  stage_e      next_stage;
  stage_e      ended_stage;   // stage and index of the MC that just ended,
  logic [31:0] ended_index;   // for its record

  always_comb begin
    unique case (stage)
      ST_STEP1: stage_len = cfg.step[0].dur_mc;
      ST_STEP2: stage_len = cfg.step[1].dur_mc;
      ST_STEP3: stage_len = cfg.step[2].dur_mc;
      ST_STEP4: stage_len = cfg.step[3].dur_mc;
      ST_TRANS: stage_len = cfg.trans_mc;
      default:  stage_len = 32'd0;
    endcase
    next_stage = stage;
    if (!enable)                        next_stage = ST_IDLE;
    else if (stage == ST_IDLE)          next_stage = ST_STEP1;
    else if (stage != ST_FULL && mc_in_stage + 32'd1 >= stage_len)
      next_stage = stage_e'(stage + 3'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage       <= ST_IDLE;
      mc_in_stage <= '0;
      step_time   <= '0;
      calc_mc     <= 1'b0;
      first_mc    <= 1'b0;
      mc_index    <= '0;
      ended_stage <= ST_IDLE;
      ended_index <= '0;
    end else begin
      calc_mc <= mc_tick;
      if (mc_tick) begin
        stage       <= next_stage;
        ended_stage <= stage;
        ended_index <= mc_index;
        first_mc <= (next_stage != stage);
        if (next_stage != stage) begin
          mc_in_stage <= '0;
          step_time   <= '0;
        end else begin
          mc_in_stage <= mc_in_stage + 1'b1;
          step_time   <= step_time + 1'b1;
        end
        mc_index <= (next_stage == ST_IDLE) ? 32'd0 : mc_index + 1'b1;
      end else begin
        step_time <= step_time + 1'b1;
      end
    end
  end

  // ---------------- record packing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec0 <= '0; rec0_valid <= 1'b0; rec1 <= '0; rec1_valid <= 1'b0;
      dropped <= '0;
    end else begin
      if (rec0_valid && rec0_ready) rec0_valid <= 1'b0;
      if (rec1_valid && rec1_ready) rec1_valid <= 1'b0;
      if (tc_rdy && stage != ST_IDLE) begin
        if (rec0_valid && !rec0_ready) begin
          dropped <= dropped + 1'b1;
        end else begin
          rec0       <= '{stage: stage, faults: faults, la: la,
                          cnt_a: sat20(tc_last), max_a: sat20(tc_max_exp), min_a: sat20(tc_min_exp),
                          cnt_b: sat20(tw_last), max_b: sat20(tw_max_exp), min_b: sat20(tw_min_exp)};
          rec0_valid <= 1'b1;
        end
      end
      if (mc_rdy && ended_stage != ST_IDLE) begin
        if (rec1_valid && !rec1_ready) begin
          dropped <= dropped + 1'b1;
        end else begin
          rec1       <= '{stage: ended_stage, faults: faults, la: LA_MAINTAIN,
                          cnt_a: sat20(bt_last), max_a: sat20(bt_max_exp), min_a: sat20(bt_min_exp),
                          cnt_b: sat20(ended_index), max_b: '0, min_b: '0};
          rec1_valid <= 1'b1;
        end
      end
    end
  end

endmodule
