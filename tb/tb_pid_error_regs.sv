// tb_pid_error_regs: self-checking test of the three-register error history.
// Random shift enables and samples; a queue model gives e_k, e_{k-1}, e_{k-2}.
module tb_pid_error_regs;
  localparam int unsigned E_W = 12;
  logic clk = 0, rst_n = 0, shift = 0;
  logic signed [E_W-1:0] ek, e0, e1, e2;
  logic signed [E_W-1:0] m0, m1, m2;
  int checks = 0, failures = 0;

  pid_error_regs #(.E_W(E_W)) dut (.clk, .rst_n, .shift, .ek, .e0, .e1, .e2);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp;
    checks++;
    if (e0 !== m0 || e1 !== m1 || e2 !== m2) begin
      failures++;
      $display("FAIL got %0d %0d %0d expected %0d %0d %0d", e0, e1, e2, m0, m1, m2);
    end
  endtask

  initial begin
    ek = '0; m0 = '0; m1 = '0; m2 = '0;
    repeat (2) @(posedge clk);
    #1 cmp();
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      shift = 1'($urandom);
      ek = E_W'($urandom);
      @(posedge clk);
      if (shift) begin m2 = m1; m1 = m0; m0 = ek; end
      #1 cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
