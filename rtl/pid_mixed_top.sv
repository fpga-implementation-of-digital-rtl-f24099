// pid_mixed_top: digital PID controller in the mixed (one multiplier,
// two adders, one accumulator) architecture.
//
// Per sample the controller computes the incremental PID law
//   L_k = L_{k-1} + e_k(Kp + Kd + Ki/2) + e_{k-1}(Ki/2 - Kp - 2Kd) + e_{k-2}Kd
// Three chained registers keep e_k, e_{k-1}, e_{k-2}. A one-hot operand
// ("3 states") register puts one of them on the multiplier. Two adders in
// series form the matching coefficient from the gains: adder 1 combines Ki
// and 2Kp, adder 2 adds or subtracts 2Kd or 4Kd. The multiplier output goes
// into an accumulator that keeps L_{k-1} from the previous sample, and an
// output register holds L_k. A state machine runs the three terms in turn.
// The datapath, its blocks and the START/DONE handshake follow the original design.
// The sizes of the gain, error and output buses (12 bits) follow its
// simulation figure. The doubled coefficients, the saturation, the reset
// and the cycle schedule are this design's own.
//
// Interface: gains kp, ki, kd are unsigned; ek and lk are signed two's
// complement. Hold the gains and ek stable from START until DONE. Pulse
// START (one cycle or longer) while DONE is high; DONE falls on the next
// edge and rises again 6 clock edges after the one that sampled START, with
// the new L_k on lk. lk then holds until the next sample ends.
module pid_mixed_top
  import pid_pkg::*;
#(
  parameter int unsigned GAIN_W = 12,
  parameter int unsigned E_W    = 12,
  parameter int unsigned OUT_W  = 12,
  parameter int unsigned ACC_W  = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [GAIN_W-1:0]       kp,
  input  logic [GAIN_W-1:0]       ki,
  input  logic [GAIN_W-1:0]       kd,
  input  logic signed [E_W-1:0]   ek,
  output logic signed [OUT_W-1:0] lk,
  output logic                    done
);

  // |2B| <= 2Kp + 4Kd + Ki < 7 * 2^GAIN_W: three extra bits plus the sign.
  localparam int unsigned C_W = GAIN_W + 4;
  localparam int unsigned P_W = C_W + E_W;

  logic                  err_shift, tri_load, acc_en, out_load;
  logic [2:0]            tri_sel;
  coef_ctl_t             add_ctl;
  logic signed [E_W-1:0] e0, e1, e2, opnd;
  logic signed [C_W-1:0] ki_x, kp_x2, kd_x2, sum1, coef;
  logic signed [P_W-1:0] prod;
  logic signed [ACC_W-1:0] acc;

  // Gains as signed coefficient-width operands; Kp and Kd doubled so that
  // Ki/2 needs no fraction (every coefficient is carried doubled).
  always_comb begin
    ki_x  = C_W'(ki);
    kp_x2 = C_W'(kp) <<< 1;
    kd_x2 = C_W'(kd) <<< 1;
  end

  pid_fsm u_fsm (
    .clk, .rst_n, .start,
    .err_shift, .tri_load, .tri_sel, .add_ctl, .acc_en, .out_load, .done
  );

  pid_error_regs #(.E_W(E_W)) u_eregs (
    .clk, .rst_n, .shift(err_shift), .ek, .e0, .e1, .e2
  );

  pid_tristate_reg #(.E_W(E_W)) u_opreg (
    .clk, .rst_n, .load(tri_load), .sel(tri_sel), .e0, .e1, .e2, .q(opnd)
  );

  pid_adder #(.W(C_W)) u_add1 (
    .a(ki_x), .b(kp_x2),
    .a_en(add_ctl.add1.a_en), .b_en(add_ctl.add1.b_en),
    .b_shl(add_ctl.add1.b_shl), .b_sub(add_ctl.add1.b_sub), .y(sum1)
  );

  pid_adder #(.W(C_W)) u_add2 (
    .a(sum1), .b(kd_x2),
    .a_en(add_ctl.add2.a_en), .b_en(add_ctl.add2.b_en),
    .b_shl(add_ctl.add2.b_shl), .b_sub(add_ctl.add2.b_sub), .y(coef)
  );

  pid_multiplier #(.A_W(C_W), .B_W(E_W)) u_mul (
    .a(coef), .b(opnd), .p(prod)
  );

  pid_accumulator #(.IN_W(P_W), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n, .en(acc_en), .d(prod), .acc, .sat()
  );

  pid_out_reg #(.ACC_W(ACC_W), .OUT_W(OUT_W)) u_out (
    .clk, .rst_n, .load(out_load), .acc, .lk, .sat()
  );

endmodule
