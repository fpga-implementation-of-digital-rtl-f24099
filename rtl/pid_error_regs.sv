// pid_error_regs: the three error registers of the mixed PID (e_k history).
//
// The incremental PID law needs the current error and the two before it.
// Three registers are chained as in the original architecture figure: on
// each `shift` pulse from the state machine, e_k is captured into the first
// register and the older values move one place down. Outputs are valid from
// the clock edge that follows the shift. Asynchronous active-low reset clears
// the history to zero (the reset behaviour is this design's choice).
module pid_error_regs #(
  parameter int unsigned E_W = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift,
  input  logic signed [E_W-1:0] ek,
  output logic signed [E_W-1:0] e0,   // e_k
  output logic signed [E_W-1:0] e1,   // e_{k-1}
  output logic signed [E_W-1:0] e2    // e_{k-2}
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e0 <= '0;
      e1 <= '0;
      e2 <= '0;
    end else if (shift) begin
      e0 <= ek;
      e1 <= e0;
      e2 <= e1;
    end
  end

endmodule
