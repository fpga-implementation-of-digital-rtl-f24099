// pid_tristate_reg: the "3 states" operand register feeding the multiplier.
//
// In the original architecture the three error registers share one bus to
// the multiplier through three-state drivers, and a register on that bus
// holds the operand. Here the one-hot output enables become an AND-OR
// multiplexer (internal three-state buses do not exist in current FPGAs),
// followed by the register. `sel` must be one-hot when `load` is high; an
// assertion checks it. The selected sample appears on `q` one cycle after
// `load`. Asynchronous active-low reset clears `q`.
module pid_tristate_reg #(
  parameter int unsigned E_W = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [2:0]            sel,  // one-hot: [0] e_k, [1] e_{k-1}, [2] e_{k-2}
  input  logic signed [E_W-1:0] e0,
  input  logic signed [E_W-1:0] e1,
  input  logic signed [E_W-1:0] e2,
  output logic signed [E_W-1:0] q
);

  logic signed [E_W-1:0] bus;

  always_comb begin
    bus = ({E_W{sel[0]}} & e0) | ({E_W{sel[1]}} & e1) | ({E_W{sel[2]}} & e2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= bus;
  end

  // Only one driver may be on the bus at a time.
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) load |-> $onehot(sel));

endmodule
