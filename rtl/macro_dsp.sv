// macro_dsp: floating-point calculator of the expected beam-on time (BT)
// range of one machine cycle (MC), following the S1-S8 flow of the macro
// checker.
//
// The ramping quantity X (PRF in step 1, PW otherwise) and the held
// quantity Y are kept between runs. On start the program runs on two
// fixed-to-float converters, one adder, one subtractor, one multiplier, one
// divider and one float-to-fixed converter (single precision, one clock
// latency each, one instruction issued every two clocks):
//   S1  (first MC of a step only) X = init, Y = hold
//   S2  inc = (X + rate*T/80.5e6/2) * Y        BT per second in this MC
//   S3  hi  = inc + E          S4  lo = inc - E
//   S5  bt_max = hi * Tb/80.5e6 S6  bt_min = lo * Tb/80.5e6
//   S7  X = X + rate*T/80.5e6  value at the start of the next MC
// T is the MC length in clocks, Tb the part of it outside the diagnostic
// notch and E the BT tolerance per second. This is the integral of F(t)W(t)
// over the beam-allowed part of the MC (Eqs. 6-8), taking the rate at the
// MC's middle. The comparison (S8) is made by the range checker outside.
// done pulses 42 clocks after start (46 with S1). The flow, the operator
// set and the equations follow the design. Scaling by Tb rather than T is
// this design's choice: no beam flows in the notch, and with the whole MC
// the expected BT would be 0.5 % high, more than the step 3 tolerance of
// 1900 counts at 20 us PW. The sequential issue order and S7 advancing X by
// a whole MC are also this design's choices.
module macro_dsp
  import ramp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             init_step,  // run S1 first
  input  logic [31:0]      t_mc,       // MC length in clocks
  input  logic [31:0]      t_beam,     // beam-allowed clocks of an MC (MC minus notch)
  input  logic [31:0]      rate,       // RATE_FRAC fraction bits
  input  logic [31:0]      init,       // start value of X
  input  logic [31:0]      hold,       // value of Y
  input  logic [31:0]      e_tol,      // BT tolerance, counts per second
  output logic             busy,
  output logic             done,
  output logic [CNT_W-1:0] bt_max,
  output logic [CNT_W-1:0] bt_min
);

  typedef enum logic [2:0] {OP_CVA, OP_CVB, OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_F2I, OP_END} op_e;

  typedef enum logic [3:0] {
    R_T, R_K, R_R, R_E, R_2, R_X, R_Y, R_P, R_Q, R_Q2, R_B, R_INC,
    R_HI, R_LO, R_TK, R_MX
  } reg_e;

  typedef struct packed {
    op_e  op;
    logic s1;     // belongs to S1, run only when init_step
    reg_e dst;    // OP_CVA/OP_CVB: also selects the source; OP_F2I: 0 max, 1 min
    reg_e a;
    reg_e b;
  } instr_t;

  localparam int unsigned N_REGS = 16;

  function automatic instr_t prog(input logic [4:0] pc);
    case (pc)
      5'd0:  return '{OP_CVA, 1'b0, R_T,  R_T,   R_T};
      5'd1:  return '{OP_CVB, 1'b0, R_K,  R_T,   R_T};
      5'd2:  return '{OP_CVA, 1'b0, R_R,  R_T,   R_T};
      5'd3:  return '{OP_CVB, 1'b0, R_E,  R_T,   R_T};
      5'd4:  return '{OP_CVA, 1'b0, R_2,  R_T,   R_T};
      5'd5:  return '{OP_CVA, 1'b1, R_X,  R_T,   R_T};    // S1
      5'd6:  return '{OP_CVB, 1'b1, R_Y,  R_T,   R_T};    // S1
      5'd7:  return '{OP_MUL, 1'b0, R_P,  R_R,   R_T};    // S2: R*T
      5'd8:  return '{OP_DIV, 1'b0, R_Q,  R_P,   R_K};    //     / 80.5e6
      5'd9:  return '{OP_DIV, 1'b0, R_Q2, R_Q,   R_2};    //     / 2
      5'd10: return '{OP_ADD, 1'b0, R_B,  R_X,   R_Q2};
      5'd11: return '{OP_MUL, 1'b0, R_INC, R_B,  R_Y};
      5'd12: return '{OP_ADD, 1'b0, R_HI, R_INC, R_E};    // S3
      5'd13: return '{OP_SUB, 1'b0, R_LO, R_INC, R_E};    // S4
      5'd14: return '{OP_CVA, 1'b0, R_P,  R_T,   R_T};    // beam-allowed time
      5'd15: return '{OP_DIV, 1'b0, R_TK, R_P,   R_K};
      5'd16: return '{OP_MUL, 1'b0, R_MX, R_HI,  R_TK};   // S5
      5'd17: return '{OP_MUL, 1'b0, R_LO, R_LO,  R_TK};   // S6
      5'd18: return '{OP_ADD, 1'b0, R_X,  R_X,   R_Q};    // S7
      5'd19: return '{OP_F2I, 1'b0, reg_e'(0), R_MX, R_T};
      5'd20: return '{OP_F2I, 1'b0, reg_e'(1), R_LO, R_T};
      default: return '{OP_END, 1'b0, R_T, R_T, R_T};
    endcase
  endfunction

  fp32_t      rf [N_REGS];
  logic [4:0] pc;
  logic       phase;
  logic       run_s1;
  instr_t     ins;
  fp32_t      opa, opb;
  logic       issue, skip;

  assign ins   = prog(pc);
  assign opa   = rf[ins.a];
  assign opb   = rf[ins.b];
  assign skip  = ins.s1 && !run_s1;
  assign issue = busy && !phase && !skip;

  logic [47:0] cva_x, cvb_x;
  logic [5:0]  cva_frac;
  always_comb begin
    cva_frac = 6'd0;
    unique case (ins.dst)
      R_T:     cva_x = 48'(t_mc);
      R_P:     cva_x = 48'(t_beam);
      R_R:     begin cva_x = 48'(rate); cva_frac = 6'(RATE_FRAC); end
      R_2:     cva_x = 48'd2;
      default: cva_x = 48'(init);
    endcase
    unique case (ins.dst)
      R_K:     cvb_x = 48'(CLK_HZ);
      R_E:     cvb_x = 48'(e_tol);
      default: cvb_x = 48'(hold);
    endcase
  end

  logic  v_cva, v_cvb, v_add, v_sub, v_mul, v_div, v_f2i;
  fp32_t y_cva, y_cvb, y_add, y_sub, y_mul, y_div;
  logic [31:0] y_f2i;

  fp_fix2flt #(.IN_W(48)) u_cva (.clk, .rst_n, .in_valid(issue && ins.op == OP_CVA),
    .x(cva_x), .frac(cva_frac), .out_valid(v_cva), .y(y_cva));
  fp_fix2flt #(.IN_W(48)) u_cvb (.clk, .rst_n, .in_valid(issue && ins.op == OP_CVB),
    .x(cvb_x), .frac(6'd0), .out_valid(v_cvb), .y(y_cvb));
  fp_add u_add (.clk, .rst_n, .in_valid(issue && ins.op == OP_ADD), .sub(1'b0),
    .a(opa), .b(opb), .out_valid(v_add), .y(y_add));
  fp_add u_sub (.clk, .rst_n, .in_valid(issue && ins.op == OP_SUB), .sub(1'b1),
    .a(opa), .b(opb), .out_valid(v_sub), .y(y_sub));
  fp_mul u_mul (.clk, .rst_n, .in_valid(issue && ins.op == OP_MUL),
    .a(opa), .b(opb), .out_valid(v_mul), .y(y_mul));
  fp_div u_div (.clk, .rst_n, .in_valid(issue && ins.op == OP_DIV),
    .a(opa), .b(opb), .out_valid(v_div), .y(y_div));
  fp_flt2fix u_f2i (.clk, .rst_n, .in_valid(issue && ins.op == OP_F2I),
    .a(opa), .out_valid(v_f2i), .y(y_f2i));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; pc <= '0; phase <= 1'b0; run_s1 <= 1'b0;
      bt_max <= '0; bt_min <= '0;
      for (int i = 0; i < int'(N_REGS); i++) rf[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; pc <= '0; phase <= 1'b0; run_s1 <= init_step;
        end
      end else if (!phase) begin
        if (ins.op == OP_END) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (skip) begin
          pc <= pc + 1'b1;
        end else begin
          phase <= 1'b1;
        end
      end else begin
        phase <= 1'b0;
        pc    <= pc + 1'b1;
        if (v_cva) rf[ins.dst] <= y_cva;
        if (v_cvb) rf[ins.dst] <= y_cvb;
        if (v_add) rf[ins.dst] <= y_add;
        if (v_sub) rf[ins.dst] <= y_sub;
        if (v_mul) rf[ins.dst] <= y_mul;
        if (v_div) rf[ins.dst] <= y_div;
        if (v_f2i) begin
          if (ins.dst == reg_e'(0)) bt_max <= y_f2i;
          else                      bt_min <= y_f2i;
        end
      end
    end
  end

endmodule
