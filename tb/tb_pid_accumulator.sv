// tb_pid_accumulator: self-checking test of the saturating accumulator.
// Random products and enables, with runs of large same-sign inputs so that
// both saturation limits are reached; the model uses 64-bit integers.
module tb_pid_accumulator;
  localparam int unsigned IN_W = 28, ACC_W = 32;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [IN_W-1:0] d;
  logic signed [ACC_W-1:0] acc;
  logic sat;
  longint m, maxv, minv;
  logic msat;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  pid_accumulator #(.IN_W(IN_W), .ACC_W(ACC_W)) dut (.clk, .rst_n, .en, .d, .acc, .sat);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint dv, s;
    maxv = (longint'(1) << (ACC_W-1)) - 1;
    minv = -(longint'(1) << (ACC_W-1));
    m = 0; msat = 0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      dv = longint'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W-1));
      // phases: drive toward +limit, then -limit, then random
      if ((i / 500) % 4 == 0) dv = (dv < 0) ? -dv : dv;
      if ((i / 500) % 4 == 2) dv = (dv > 0) ? -dv : dv;
      d = IN_W'(dv);
      @(posedge clk);
      if (en) begin
        s = m + longint'(d);
        msat = (s > maxv) || (s < minv);
        m = (s > maxv) ? maxv : (s < minv) ? minv : s;
        if (s > maxv) n_hi++;
        if (s < minv) n_lo++;
      end
      #1;
      checks++;
      if (longint'(acc) != m || sat !== msat) begin
        failures++;
        $display("FAIL acc=%0d sat=%b expected %0d %b", acc, sat, m, msat);
      end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("FAIL saturation not reached: hi=%0d lo=%0d", n_hi, n_lo);
    end
    $display("saturations: high %0d low %0d", n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
