// pid_pkg: types shared by the mixed-architecture PID controller.
//
// The controller evaluates the incremental PID law
//   L_k = L_{k-1} + A*e_k + B*e_{k-1} + C*e_{k-2}
//   A = Kp + Kd + Ki/2,  B = Ki/2 - Kp - 2Kd,  C = Kd
// one term at a time. To keep Ki/2 exact, every coefficient is carried
// doubled (2A, 2B, 2C) and the accumulator holds 2*L. The package defines
// the per-term adder controls that the state machine issues to the two
// adders, and the state encoding of that state machine. The term order and
// the control encoding are this design's own choices.
package pid_pkg;

  // Which coefficient the two adders must form.
  typedef enum logic [1:0] {
    COEF_A = 2'd0,   // 2A = Ki + 2Kp + 2Kd   (multiplies e_k)
    COEF_B = 2'd1,   // 2B = Ki - 2Kp - 4Kd   (multiplies e_{k-1})
    COEF_C = 2'd2    // 2C = 2Kd              (multiplies e_{k-2})
  } coef_sel_e;

  // Controls of one adder: y = (a_en ? a : 0) +/- (b_en ? (b_shl ? 2b : b) : 0)
  typedef struct packed {
    logic a_en;
    logic b_en;
    logic b_shl;
    logic b_sub;
  } add_ctl_t;

  // Controls of both adders. Adder 1 sums Ki and 2Kp, adder 2 adds 2Kd to it.
  typedef struct packed {
    add_ctl_t add1;
    add_ctl_t add2;
  } coef_ctl_t;

  // One-hot selects of the operand ("3 states") register.
  localparam logic [2:0] SEL_E0 = 3'b001;  // e_k
  localparam logic [2:0] SEL_E1 = 3'b010;  // e_{k-1}
  localparam logic [2:0] SEL_E2 = 3'b100;  // e_{k-2}

  // Adder settings that form each doubled coefficient.
  function automatic coef_ctl_t coef_ctl(coef_sel_e c);
    coef_ctl_t r;
    unique case (c)
      COEF_A:  begin r.add1 = '{1'b1, 1'b1, 1'b0, 1'b0}; r.add2 = '{1'b1, 1'b1, 1'b0, 1'b0}; end
      COEF_B:  begin r.add1 = '{1'b1, 1'b1, 1'b0, 1'b1}; r.add2 = '{1'b1, 1'b1, 1'b1, 1'b1}; end
      COEF_C:  begin r.add1 = '{1'b0, 1'b0, 1'b0, 1'b0}; r.add2 = '{1'b1, 1'b1, 1'b0, 1'b0}; end
      default: begin r.add1 = '0;                          r.add2 = '0;                          end
    endcase
    return r;
  endfunction

  // States of the sequencer, one per clock cycle of a sample.
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,  // DONE high, waiting for START
    ST_SHIFT = 3'd1,  // e_k enters the error registers
    ST_T2    = 3'd2,  // operand register <- e_{k-2}
    ST_T1    = 3'd3,  // acc += 2C*e_{k-2}; operand register <- e_{k-1}
    ST_T0    = 3'd4,  // acc += 2B*e_{k-1}; operand register <- e_k
    ST_A0    = 3'd5,  // acc += 2A*e_k
    ST_WR    = 3'd6   // output register <- L_k
  } state_e;

  // Clock edges from the edge that samples START to the edge that raises DONE.
  localparam int unsigned CYCLES_PER_SAMPLE = 6;

endpackage
