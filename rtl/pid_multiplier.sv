// pid_multiplier: the single combinational multiplier of the mixed PID.
//
// Multiplies the coefficient from the adder chain (signed, A_W bits) by the
// error sample held in the operand register (signed, B_W bits). The original design
// asks for one combinational multiplier; the signed array product written
// here is the simplest such circuit. Full-precision result, no latency.
module pid_multiplier #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 12
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  always_comb p = (A_W+B_W)'(a) * (A_W+B_W)'(b);

endmodule
