// tb_pid_out_reg: self-checking test of the output register.
// The model halves the accumulator value (floor) and clamps it to the signed
// OUT_W range; values in range, above and below are all exercised.
module tb_pid_out_reg;
  localparam int unsigned ACC_W = 32, OUT_W = 12;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [ACC_W-1:0] acc;
  logic signed [OUT_W-1:0] lk;
  logic sat;
  longint m;
  logic msat;
  int checks = 0, failures = 0, n_in = 0, n_hi = 0, n_lo = 0;

  pid_out_reg #(.ACC_W(ACC_W), .OUT_W(OUT_W)) dut (.clk, .rst_n, .load, .acc, .lk, .sat);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint av, h, hi, lo;
    hi = (longint'(1) << (OUT_W-1)) - 1;
    lo = -(longint'(1) << (OUT_W-1));
    m = 0; msat = 0; acc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 3) != 0);
      case (i % 3)
        0: av = longint'($urandom_range(0, 1 << (OUT_W+1))) - (1 << OUT_W);        // near the range
        1: av = longint'($urandom_range(0, 16)) - 8 + ((i % 2) ? 2*hi : 2*lo);     // at the edges
        default: av = longint'(signed'($urandom));                                  // anywhere
      endcase
      acc = ACC_W'(av);
      @(posedge clk);
      if (load) begin
        h = longint'(acc) >>> 1;
        msat = (h > hi) || (h < lo);
        m = (h > hi) ? hi : (h < lo) ? lo : h;
        if (h > hi) n_hi++; else if (h < lo) n_lo++; else n_in++;
      end
      #1;
      checks++;
      if (longint'(lk) != m || sat !== msat) begin
        failures++;
        $display("FAIL acc=%0d lk=%0d sat=%b expected %0d %b", acc, lk, sat, m, msat);
      end
    end
    $display("in range %0d, clamped high %0d, low %0d", n_in, n_hi, n_lo);
    checks++;
    if (n_in == 0 || n_hi == 0 || n_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
