// tb_pid_mixed_top: end-to-end test of the mixed-architecture PID controller
// at its default sizes (12-bit gains, error and output, 32-bit accumulator).
//
// A reference model computes the incremental law
//   2L_k = 2L_{k-1} + 2C*e_{k-2} + 2B*e_{k-1} + 2A*e_k
// term by term with the same saturation at the accumulator width, then
// halves (floor) and clamps to the output width. Every sample checks L_k and
// that DONE rises exactly 6 clock edges after the edge that samples START.
// Phases: random gains and errors; the all-FFF input case of the
// controller's timing diagram; a long positive error that drives the
// accumulator to its upper limit and a long negative one to its lower limit;
// START held high (back-to-back samples) and START pulsed while busy
// (ignored). Each mechanism is counted and must occur at least once.
module tb_pid_mixed_top;
  import pid_pkg::*;
  localparam int unsigned GAIN_W = 12, E_W = 12, OUT_W = 12, ACC_W = 32;

  logic clk = 0, rst_n = 0, start = 0;
  logic [GAIN_W-1:0] kp = '0, ki = '0, kd = '0;
  logic signed [E_W-1:0] ek = '0;
  logic signed [OUT_W-1:0] lk;
  logic done;

  pid_mixed_top dut (.clk, .rst_n, .start, .kp, .ki, .kd, .ek, .lk, .done);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_neg_coef = 0, n_acc_sat_hi = 0, n_acc_sat_lo = 0, n_out_hi = 0, n_out_lo = 0;
  int n_b2b = 0, n_busy_start = 0, n_samples = 0;
  longint m_acc = 0, m_e0 = 0, m_e1 = 0, m_e2 = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint acc_add(longint a, longint d);
    longint s = a + d;
    longint mx = (longint'(1) << (ACC_W-1)) - 1;
    longint mn = -(longint'(1) << (ACC_W-1));
    if (s > mx) begin n_acc_sat_hi++; return mx; end
    if (s < mn) begin n_acc_sat_lo++; return mn; end
    return s;
  endfunction

  // Model of one sample; returns the expected L_k.
  function automatic longint model(longint gp, longint gi, longint gd, longint e);
    longint c2a, c2b, c2c, h, hi, lo;
    m_e2 = m_e1; m_e1 = m_e0; m_e0 = e;
    c2a = gi + 2*gp + 2*gd;
    c2b = gi - 2*gp - 4*gd;
    c2c = 2*gd;
    if (c2b < 0 && m_e1 != 0) n_neg_coef++;
    m_acc = acc_add(m_acc, c2c * m_e2);
    m_acc = acc_add(m_acc, c2b * m_e1);
    m_acc = acc_add(m_acc, c2a * m_e0);
    h  = m_acc >>> 1;
    hi = (longint'(1) << (OUT_W-1)) - 1;
    lo = -(longint'(1) << (OUT_W-1));
    if (h > hi) begin n_out_hi++; return hi; end
    if (h < lo) begin n_out_lo++; return lo; end
    return h;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL sample %0d: %s", n_samples, what);
    end
  endtask

  // One sample. mode 0: one-cycle START; 1: extra START pulse while busy;
  // 2: START left high so that the next sample begins as DONE rises.
  task automatic run_sample(input longint gp, input longint gi, input longint gd,
                            input longint e, input int mode);
    longint exp;
    int cyc;
    @(negedge clk);
    kp = GAIN_W'(gp); ki = GAIN_W'(gi); kd = GAIN_W'(gd); ek = E_W'(e);
    if (!done) begin
      // previous sample was started back-to-back: it must already be running
      cyc = 0;
      while (!done && cyc < 20) begin @(negedge clk); cyc++; end
    end
    start = 1;
    @(posedge clk);           // this edge samples START
    #1;
    start = (mode == 2);
    check(!done, "DONE did not fall after START");
    exp = model(gp, gi, gd, e);
    cyc = 0;
    while (!done && cyc < 20) begin
      if (mode == 1 && cyc == 2) begin start = 1; n_busy_start++; end
      if (mode == 1 && cyc == 3) start = 0;
      @(posedge clk); #1; cyc++;
    end
    check(cyc == int'(CYCLES_PER_SAMPLE), $sformatf("DONE after %0d edges, expected %0d", cyc, CYCLES_PER_SAMPLE));
    check(longint'(lk) == exp, $sformatf("L_k=%0d expected %0d (kp=%0d ki=%0d kd=%0d e=%0d)",
                                         lk, exp, gp, gi, gd, e));
    n_samples++;
    if (mode == 2) begin
      // START was still high: the next edge begins a sample with the same inputs
      @(posedge clk); #1;
      start = 0;
      n_b2b++;
      exp = model(gp, gi, gd, e);
      cyc = 0;
      while (!done && cyc < 20) begin @(posedge clk); #1; cyc++; end
      check(cyc == int'(CYCLES_PER_SAMPLE), "back-to-back sample length");
      check(longint'(lk) == exp, $sformatf("back-to-back L_k=%0d expected %0d", lk, exp));
      n_samples++;
    end
    if (mode == 1) begin
      // the START seen while busy must not have begun another sample
      repeat (3) begin @(posedge clk); #1 check(done, "START while busy began a sample"); end
    end
  endtask

  task automatic count_check(input int n, input string what);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    longint e;
    repeat (3) @(posedge clk);
    #1 check(done && lk == 0, "reset state");
    rst_n = 1;
    // random gains and small errors, all three START modes
    for (int i = 0; i < 300; i++) begin
      e = longint'($urandom_range(0, 200)) - 100;
      run_sample($urandom_range(0, 63), $urandom_range(0, 63), $urandom_range(0, 63), e, i % 3);
    end
    // the all-FFF inputs of the timing diagram (ek = FFF is -1)
    for (int i = 0; i < 5; i++) run_sample(4095, 4095, 4095, -1, 0);
    // random everything, full ranges
    for (int i = 0; i < 300; i++) begin
      e = longint'($urandom_range(0, 4095)) - 2048;
      run_sample($urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095), e, 0);
    end
    // long positive error: integral action winds the accumulator to +limit
    for (int i = 0; i < 200; i++) run_sample(4095, 4095, 4095, 2047, 0);
    // long negative error: down to -limit
    for (int i = 0; i < 400; i++) run_sample(4095, 4095, 4095, -2048, 0);
    // reset in the middle clears the state
    @(negedge clk) rst_n = 0;
    m_acc = 0; m_e0 = 0; m_e1 = 0; m_e2 = 0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      e = longint'($urandom_range(0, 4095)) - 2048;
      run_sample($urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095), e, i % 3);
    end
    $display("samples                            %0d", n_samples);
    count_check(n_neg_coef,   "negative e_{k-1} coefficient");
    count_check(n_out_hi,     "output clamped high");
    count_check(n_out_lo,     "output clamped low");
    count_check(n_acc_sat_hi, "accumulator saturated high");
    count_check(n_acc_sat_lo, "accumulator saturated low");
    count_check(n_b2b,        "back-to-back START");
    count_check(n_busy_start, "START while busy ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
