// tb_pid_adder: self-checking test of the coefficient adder/subtractor.
// Random operands and random control bits; the expected value is computed
// with 64-bit integers and truncated to W bits. Also forms the three doubled
// PID coefficients with two adders in series, as the controller does.
module tb_pid_adder;
  import pid_pkg::*;
  localparam int unsigned W = 16;
  logic signed [W-1:0] a, b, y, y2, exp_w;
  logic a_en, b_en, b_shl, b_sub;
  coef_ctl_t cc;
  logic signed [W-1:0] ki, kp2, kd2;
  int checks = 0, failures = 0;

  pid_adder #(.W(W)) dut (.a, .b, .a_en, .b_en, .b_shl, .b_sub, .y);
  // second pair, wired as in the controller
  logic signed [W-1:0] s1;
  pid_adder #(.W(W)) u1 (.a(ki), .b(kp2), .a_en(cc.add1.a_en), .b_en(cc.add1.b_en),
                         .b_shl(cc.add1.b_shl), .b_sub(cc.add1.b_sub), .y(s1));
  pid_adder #(.W(W)) u2 (.a(s1), .b(kd2), .a_en(cc.add2.a_en), .b_en(cc.add2.b_en),
                         .b_shl(cc.add2.b_shl), .b_sub(cc.add2.b_sub), .y(y2));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, bb;
    int gkp, gki, gkd;
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom); b = W'($urandom);
      {a_en, b_en, b_shl, b_sub} = 4'($urandom);
      #1;
      bb = b_en ? (b_shl ? 2 * longint'(b) : longint'(b)) : 0;
      e  = (a_en ? longint'(a) : 0) + (b_sub ? -bb : bb);
      exp_w = W'(e);  // W-bit two's complement wrap
      check(longint'(y), longint'(exp_w), "adder");
    end
    for (int i = 0; i < 500; i++) begin
      gkp = int'($urandom_range(0, 4095)); gki = int'($urandom_range(0, 4095)); gkd = int'($urandom_range(0, 4095));
      if (i == 0) begin gkp = 4095; gki = 4095; gkd = 4095; end
      ki = W'(gki); kp2 = W'(2 * gkp); kd2 = W'(2 * gkd);
      cc = coef_ctl(COEF_A); #1; check(longint'(y2), longint'(gki + 2*gkp + 2*gkd), "2A");
      cc = coef_ctl(COEF_B); #1; check(longint'(y2), longint'(gki - 2*gkp - 4*gkd), "2B");
      cc = coef_ctl(COEF_C); #1; check(longint'(y2), longint'(2*gkd), "2C");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
