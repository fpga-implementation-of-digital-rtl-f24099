// pid_out_reg: output register holding the control value L_k.
//
// At the end of a sample the state machine pulses `load`; the register then
// takes the accumulator value, which holds 2*L_k, halves it (arithmetic
// shift, rounding toward minus infinity) and limits it to the signed OUT_W
// range of the output bus. `sat` tells whether the value was limited. The
// register and its output come from the original design; the halving follows from
// the doubled coefficients and the limiting is this design's choice, taken
// because the original design notes that the control variable may reach actuator
// limits. One cycle from `load` to `lk`. Asynchronous active-low reset
// clears the output.
module pid_out_reg #(
  parameter int unsigned ACC_W = 32,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [ACC_W-1:0] acc,
  output logic signed [OUT_W-1:0] lk,
  output logic                    sat
);

  localparam logic signed [ACC_W-1:0] HI = ACC_W'({1'b0, {(OUT_W-1){1'b1}}});
  localparam logic signed [ACC_W-1:0] LO = -HI - ACC_W'(1);

  logic signed [ACC_W-1:0] half;
  logic signed [OUT_W-1:0] lim;
  logic                    over;

  always_comb begin
    half = acc >>> 1;
    over = 1'b1;
    if (half > HI)      lim = HI[OUT_W-1:0];
    else if (half < LO) lim = LO[OUT_W-1:0];
    else begin
      lim  = half[OUT_W-1:0];
      over = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk  <= '0;
      sat <= 1'b0;
    end else if (load) begin
      lk  <= lim;
      sat <= over;
    end
  end

endmodule
