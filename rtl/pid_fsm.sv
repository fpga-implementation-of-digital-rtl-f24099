// pid_fsm: state machine that sequences one PID sample.
//
// The original design gives the mixed architecture one finite state machine to run
// all data transfers, started by START and answering with DONE. The states
// and their order are this design's own (the term with e_{k-2} first):
//   IDLE  DONE high; START moves to SHIFT
//   SHIFT error registers take e_k
//   T2    operand register <- e_{k-2}
//   T1    acc += 2C*e_{k-2};  operand register <- e_{k-1}
//   T0    acc += 2B*e_{k-1};  operand register <- e_k
//   A0    acc += 2A*e_k
//   WR    output register <- L_k, then back to IDLE
// Loading the next operand while the previous product is accumulated saves
// one cycle per term. DONE rises CYCLES_PER_SAMPLE (6) clock edges after
// the edge that samples START. START is ignored while a sample is running.
// All outputs are decoded from the registered state (Moore machine).
module pid_fsm
  import pid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       err_shift,
  output logic       tri_load,
  output logic [2:0] tri_sel,
  output coef_ctl_t  add_ctl,
  output logic       acc_en,
  output logic       out_load,
  output logic       done
);

  state_e state, state_nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_nxt;
  end

  always_comb begin
    unique case (state)
      ST_IDLE:  state_nxt = start ? ST_SHIFT : ST_IDLE;
      ST_SHIFT: state_nxt = ST_T2;
      ST_T2:    state_nxt = ST_T1;
      ST_T1:    state_nxt = ST_T0;
      ST_T0:    state_nxt = ST_A0;
      ST_A0:    state_nxt = ST_WR;
      ST_WR:    state_nxt = ST_IDLE;
      default:  state_nxt = ST_IDLE;
    endcase
  end

  always_comb begin
    err_shift = 1'b0;
    tri_load  = 1'b0;
    tri_sel   = SEL_E2;
    add_ctl   = coef_ctl(COEF_C);
    acc_en    = 1'b0;
    out_load  = 1'b0;
    done      = 1'b0;
    unique case (state)
      ST_IDLE:  done = 1'b1;
      ST_SHIFT: err_shift = 1'b1;
      ST_T2:    begin tri_load = 1'b1; tri_sel = SEL_E2; end
      ST_T1:    begin tri_load = 1'b1; tri_sel = SEL_E1; acc_en = 1'b1; add_ctl = coef_ctl(COEF_C); end
      ST_T0:    begin tri_load = 1'b1; tri_sel = SEL_E0; acc_en = 1'b1; add_ctl = coef_ctl(COEF_B); end
      ST_A0:    begin acc_en = 1'b1; add_ctl = coef_ctl(COEF_A); end
      ST_WR:    out_load = 1'b1;
      default:  ;
    endcase
  end

endmodule
