// tb_pid_fsm: self-checking test of the sample sequencer.
// Checks, cycle by cycle after START, the expected control word of every
// state, the 6-cycle START-to-DONE time, that START is ignored while busy,
// that START still high in IDLE begins the next sample at once, and that
// the state machine waits in IDLE with DONE high.
module tb_pid_fsm;
  import pid_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic err_shift, tri_load, acc_en, out_load, done;
  logic [2:0] tri_sel;
  coef_ctl_t add_ctl;
  int checks = 0, failures = 0;

  pid_fsm dut (.clk, .rst_n, .start, .err_shift, .tri_load, .tri_sel, .add_ctl,
               .acc_en, .out_load, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected err_shift, tri_load, tri_sel (when loading), acc_en,
  // adder controls (when accumulating), out_load, done
  task automatic expect_ctl(input string nm, input logic es, input logic tl, input logic [2:0] ts,
                            input logic ae, input coef_sel_e cs, input logic ol, input logic dn);
    checks++;
    if (err_shift !== es || tri_load !== tl || (tl && tri_sel !== ts) || acc_en !== ae ||
        (ae && add_ctl !== coef_ctl(cs)) || out_load !== ol || done !== dn) begin
      failures++;
      $display("FAIL %s: shift=%b tload=%b tsel=%b acc=%b ctl=%h out=%b done=%b", nm,
               err_shift, tri_load, tri_sel, acc_en, add_ctl, out_load, done);
    end
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    #1 expect_ctl("reset", 0, 0, 0, 0, COEF_A, 0, 1);
    rst_n = 1;
    for (int s = 0; s < 20; s++) begin
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1 expect_ctl("idle", 0, 0, 0, 0, COEF_A, 0, 1);
      end
      @(negedge clk) start = 1;
      @(posedge clk); #1;
      start = 1'(s % 2);  // odd samples hold START high throughout
      expect_ctl("SHIFT", 1, 0, 0, 0, COEF_A, 0, 0);
      @(posedge clk); #1 expect_ctl("T2", 0, 1, SEL_E2, 0, COEF_A, 0, 0);
      @(posedge clk); #1 expect_ctl("T1", 0, 1, SEL_E1, 1, COEF_C, 0, 0);
      @(posedge clk); #1 expect_ctl("T0", 0, 1, SEL_E0, 1, COEF_B, 0, 0);
      @(posedge clk); #1 expect_ctl("A0", 0, 0, 0, 1, COEF_A, 0, 0);
      @(posedge clk); #1 expect_ctl("WR", 0, 0, 0, 0, COEF_A, 1, 0);
      @(posedge clk); #1 expect_ctl("DONE", 0, 0, 0, 0, COEF_A, 0, 1);
      if (s % 2) begin
        // START still high in IDLE: the next edge begins a new sample
        @(posedge clk); #1;
        start = 0;
        cyc = 0;  // edges after the one that sampled START
        while (!done && cyc < 20) begin @(posedge clk); #1; cyc++; end
        checks++;
        if (cyc != int'(CYCLES_PER_SAMPLE)) begin
          failures++;
          $display("FAIL back-to-back sample took %0d cycles", cyc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
