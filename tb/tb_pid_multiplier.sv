// tb_pid_multiplier: self-checking test of the signed multiplier.
// Random and corner operands; expected products from 64-bit integer math.
module tb_pid_multiplier;
  localparam int unsigned A_W = 16, B_W = 12;
  logic signed [A_W-1:0] a;
  logic signed [B_W-1:0] b;
  logic signed [A_W+B_W-1:0] p;
  int checks = 0, failures = 0;

  pid_multiplier #(.A_W(A_W), .B_W(B_W)) dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ea, eb;
    for (int i = 0; i < 3000; i++) begin
      ea = longint'($urandom_range(0, (1 << A_W) - 1)) - (1 << (A_W-1));
      eb = longint'($urandom_range(0, (1 << B_W) - 1)) - (1 << (B_W-1));
      if (i == 0) begin ea = -(1 << (A_W-1)); eb = -(1 << (B_W-1)); end
      if (i == 1) begin ea = (1 << (A_W-1)) - 1; eb = -1; end
      if (i == 2) begin ea = -1; eb = -1; end
      a = A_W'(ea); b = B_W'(eb);
      #1;
      checks++;
      if (longint'(p) != ea * eb) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", ea, eb, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
