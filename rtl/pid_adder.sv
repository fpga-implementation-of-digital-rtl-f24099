// pid_adder: adder/subtractor that forms a PID coefficient from the gains.
//
// The mixed PID datapath has two of these in series. The state machine sets
// their controls each cycle so that, together, they produce the coefficient
// of the term being accumulated (see pid_pkg). The original design names the adders
// and where they connect; how they are controlled is this design's choice:
//   y = (a_en ? a : 0) + (b_sub ? -1 : +1) * (b_en ? (b_shl ? 2*b : b) : 0)
// Operands and result are signed W-bit two's complement; the caller sizes W
// so that no sum overflows. Purely combinational, no latency.
module pid_adder #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                a_en,
  input  logic                b_en,
  input  logic                b_shl,
  input  logic                b_sub,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] a_g;
  logic signed [W-1:0] b_g;

  always_comb begin
    a_g = a_en ? a : '0;
    b_g = b_en ? (b_shl ? (b <<< 1) : b) : '0;
    y   = b_sub ? (a_g - b_g) : (a_g + b_g);
  end

endmodule
