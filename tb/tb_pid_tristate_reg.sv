// tb_pid_tristate_reg: self-checking test of the one-hot operand register.
// Random one-hot selects and loads; the model keeps the last selected value.
module tb_pid_tristate_reg;
  localparam int unsigned E_W = 12;
  logic clk = 0, rst_n = 0, load = 0;
  logic [2:0] sel = 3'b001;
  logic signed [E_W-1:0] e0, e1, e2, q, m;
  int checks = 0, failures = 0;

  pid_tristate_reg #(.E_W(E_W)) dut (.clk, .rst_n, .load, .sel, .e0, .e1, .e2, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    e0 = '0; e1 = '0; e2 = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      s = int'($urandom_range(0, 2));
      sel = 3'(1 << s);
      e0 = E_W'($urandom); e1 = E_W'($urandom); e2 = E_W'($urandom);
      @(posedge clk);
      if (load) m = (s == 0) ? e0 : (s == 1) ? e1 : e2;
      #1;
      checks++;
      if (q !== m) begin
        failures++;
        $display("FAIL sel=%b got %0d expected %0d", sel, q, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
