// pulse_counter: measures the beam gate pulses with the 80.5 MHz clock.
//
// One of the three gate observations (GTS logic gate, HV switch level,
// chopper plate current) is chosen by src_sel and brought into the clock
// domain by two flip-flops. Three counters run on it:
//  * PW: clocks the gate is high; tw_rdy pulses after the falling edge with
//    the width in tw_last.
//  * Cycle: clocks from one rising edge to the next, or to the machine-cycle
//    (MC) start tick if that comes first; tc_rdy pulses with the length in
//    tc_last. pulse_start pulses together with each new rising edge.
//  * Beam-on time (BT): clocks the gate is high between MC ticks; mc_rdy
//    pulses after each tick with the total in bt_last.
// All strobes are registered and come two to three clocks after the gate
// edge (synchroniser plus edge detect). mc_time counts clocks since the
// last MC tick. Counting PW, cycle and BT and producing their done signals
// follows the design; the source select, the synchroniser and ending a
// cycle at the MC tick are this design's choices.
module pulse_counter
  import ramp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gate_gts,   // gate from the GTS event receiver
  input  logic             gate_hv,    // HV switch level, discriminated
  input  logic             gate_cp,    // chopper plate current, discriminated
  input  logic [1:0]       src_sel,    // 0 GTS, 1 HV, 2/3 chopper plate
  input  logic             mc_tick,    // one clock at each MC start
  output logic             gate,       // synchronised selected gate
  output logic             pulse_start,
  output logic [CNT_W-1:0] tw_count,
  output logic             tw_active,
  output logic             tw_rdy,
  output logic [CNT_W-1:0] tw_last,
  output logic [CNT_W-1:0] tc_count,
  output logic             tc_active,
  output logic             tc_rdy,
  output logic [CNT_W-1:0] tc_last,
  output logic [CNT_W-1:0] bt_count,
  output logic             mc_rdy,
  output logic [CNT_W-1:0] bt_last,
  output logic [CNT_W-1:0] mc_time
);

  logic g_raw, g_s1, g_s2, g_d;
  logic rise, fall;

  always_comb begin
    unique case (src_sel)
      2'd0:    g_raw = gate_gts;
      2'd1:    g_raw = gate_hv;
      default: g_raw = gate_cp;
    endcase
  end

  assign gate      = g_s2;
  assign rise      = g_s2 && !g_d;
  assign fall      = !g_s2 && g_d;
  assign tw_active = g_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_s1 <= 1'b0; g_s2 <= 1'b0; g_d <= 1'b0;
      pulse_start <= 1'b0;
      tw_count <= '0; tw_rdy <= 1'b0; tw_last <= '0;
      tc_count <= '0; tc_active <= 1'b0; tc_rdy <= 1'b0; tc_last <= '0;
      bt_count <= '0; mc_rdy <= 1'b0; bt_last <= '0;
      mc_time  <= '0;
    end else begin
      g_s1 <= g_raw;
      g_s2 <= g_s1;
      g_d  <= g_s2;

      // pulse width
      tw_rdy <= fall;
      if (rise)      tw_count <= 1;
      else if (g_s2) tw_count <= tw_count + 1'b1;
      if (fall)      tw_last  <= tw_count;

      // pulse cycle
      pulse_start <= rise;
      tc_rdy      <= tc_active && (rise || mc_tick);
      if (tc_active && (rise || mc_tick)) tc_last <= tc_count;
      if (rise) begin
        tc_count  <= 1;
        tc_active <= 1'b1;
      end else if (mc_tick) begin
        tc_active <= 1'b0;
      end else if (tc_active) begin
        tc_count  <= tc_count + 1'b1;
      end

      // beam-on time of the machine cycle
      mc_rdy <= mc_tick;
      if (mc_tick) begin
        bt_last  <= bt_count;
        bt_count <= g_s2 ? 1 : 0;
        mc_time  <= '0;
      end else begin
        if (g_s2) bt_count <= bt_count + 1'b1;
        mc_time <= mc_time + 1'b1;
      end
    end
  end

endmodule
