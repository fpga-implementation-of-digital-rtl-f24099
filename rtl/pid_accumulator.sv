// pid_accumulator: running sum of the incremental PID law.
//
// Each cycle `en` is high, the product from the multiplier is added to the
// accumulator. It is never cleared between samples, so every sample starts
// from L_{k-1}: this is the incremental form L_k = L_{k-1} + ... that the
// original design uses. With the doubled coefficients of pid_pkg the register holds
// 2*L. Instead of wrapping, the sum saturates at the signed ACC_W range, and
// `sat` reports that the last addition was limited (saturation is this
// design's choice). One cycle from `en` to the new `acc`. Asynchronous
// active-low reset clears the sum, i.e. L_{-1} = 0.
module pid_accumulator #(
  parameter int unsigned IN_W  = 28,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  d,
  output logic signed [ACC_W-1:0] acc,
  output logic                    sat
);

  localparam logic signed [ACC_W-1:0] MAXV = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] MINV = {1'b1, {(ACC_W-1){1'b0}}};

  logic signed [ACC_W:0]   sum;    // one guard bit
  logic signed [ACC_W-1:0] nxt;
  logic                    ovf;

  always_comb begin
    sum = (ACC_W+1)'(acc) + (ACC_W+1)'(d);
    ovf = (sum[ACC_W] != sum[ACC_W-1]);
    if (!ovf)          nxt = sum[ACC_W-1:0];
    else if (sum[ACC_W]) nxt = MINV;
    else               nxt = MAXV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      sat <= 1'b0;
    end else if (en) begin
      acc <= nxt;
      sat <= ovf;
    end
  end

endmodule
