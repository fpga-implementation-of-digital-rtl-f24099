// tb_pid_step_response: closed-loop step response of the mixed PID
// controller driving a second-order plant, at the controller's default sizes.
//
// Loop settings: proportional gain 0.3, integral time 2 s, derivative time
// 0.5 s, sampling period 0.1 s; plant wn^2/(s^2 + 2*zeta*wn*s + wn^2) with
// zeta = 0.3, wn = 1 rad/s; set point 5 V.
// The discrete gains of the mixed form are Kp = 0.3, Ki = Kp*Te/Ti = 0.015,
// Kd = Kp*Td/Te = 1.5, i.e. in the exact ratio 20 : 1 : 100. They are given
// to the controller as the integers kp = 20, ki = 1, kd = 100, so the
// controller output is 20/0.3 times the plant input in error units. One
// error unit is 5/16 V, so the set point is 16 units and the steady-state
// output about 1067, inside the 12-bit output range.
// The plant is integrated in the testbench with 1000 Euler steps per sample
// (zero-order hold on the controller output). Every L_k is checked against
// an integer model of the control law; at the end the plant output must be
// within one error unit of the set point and the overshoot recorded.
module tb_pid_step_response;
  import pid_pkg::*;
  localparam int unsigned GAIN_W = 12, E_W = 12, OUT_W = 12;
  localparam real TE = 0.1, ZETA = 0.3, WN = 1.0, SETPOINT = 5.0;
  localparam real LSB = 5.0 / 16.0;            // volts per error unit
  localparam real GSCALE = 20.0 / 0.3;         // integer gain / real gain
  localparam int  NSAMP = 300;                 // 30 s
  localparam int  NSUB = 1000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [GAIN_W-1:0] kp = 12'd20, ki = 12'd1, kd = 12'd100;
  logic signed [E_W-1:0] ek = '0;
  logic signed [OUT_W-1:0] lk;
  logic done;

  pid_mixed_top dut (.clk, .rst_n, .start, .kp, .ki, .kd, .ek, .lk, .done);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_clamp = 0;

  initial begin
    repeat (NSAMP * 20 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real y, dy, u, h, ymax;
    longint m_acc, e0, e1, e2, exp_l, half;
    int e, cyc;
    y = 0.0; dy = 0.0; ymax = 0.0;
    m_acc = 0; e0 = 0; e1 = 0; e2 = 0;
    h = TE / NSUB;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NSAMP; k++) begin
      // sample the plant output, form the quantised error
      e = int'((SETPOINT - y) / LSB);   // rounds to nearest
      @(negedge clk);
      ek = E_W'(e);
      start = 1;
      @(posedge clk); #1 start = 0;
      cyc = 0;
      while (!done && cyc < 20) begin @(posedge clk); #1; cyc++; end
      // integer model of the controller
      e2 = e1; e1 = e0; e0 = e;
      m_acc += 2 * 100 * e2 + (1 - 40 - 400) * e1 + (1 + 40 + 200) * e0;
      half = m_acc >>> 1;
      exp_l = (half > 2047) ? 2047 : (half < -2048) ? -2048 : half;
      if (exp_l != half) n_clamp++;
      checks++;
      if (cyc != int'(CYCLES_PER_SAMPLE) || longint'(lk) != exp_l) begin
        failures++;
        $display("FAIL k=%0d cycles=%0d L=%0d expected %0d", k, cyc, lk, exp_l);
      end
      // plant input held for one period
      u = real'(lk) * LSB / GSCALE;
      for (int i = 0; i < NSUB; i++) begin
        real ddy;
        ddy = WN * WN * (u - y) - 2.0 * ZETA * WN * dy;
        y  += h * dy;
        dy += h * ddy;
      end
      if (y > ymax) ymax = y;
      if (k % 20 == 0) $display("t=%5.1f s  e=%4d  L=%5d  y=%6.3f", (k + 1) * TE, e, lk, y);
    end
    $display("final y = %0.3f V, peak %0.3f V, samples with clamped output %0d", y, ymax, n_clamp);
    checks++;
    if (y < SETPOINT - LSB || y > SETPOINT + LSB) begin
      failures++;
      $display("FAIL output did not settle at the set point");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
