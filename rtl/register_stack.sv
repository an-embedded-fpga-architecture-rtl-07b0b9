// register_stack: feedback registers between the state observer and the QP
// solver.
//
// It keeps the newest observer estimate s = [x; d] (NX states and NY output
// disturbances) and the control moves u of the previous MPC run. `save_state`
// (from the MPC FSM on STATE-OBSERVER-DONE) loads s_new; `save_u` (when the
// solver finishes) loads u_new. The observer reads s_q and u_q as its previous
// estimate and previous input, and the solver reads s_q as its initial state.
// Values are Q8.8 and cleared to zero by reset. Loads take effect at the next
// clock edge. The role follows the document; the reset value is this design's.
module register_stack
  import mpc_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NU = 2,
  parameter int unsigned NY = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic save_state,
  input  q88_t s_new [NX+NY],
  input  logic save_u,
  input  q88_t u_new [NU],
  output q88_t s_q   [NX+NY],
  output q88_t u_q   [NU]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NX + NY; i++) s_q[i] <= '0;
      for (int i = 0; i < NU; i++)      u_q[i] <= '0;
    end else begin
      if (save_state) for (int i = 0; i < NX + NY; i++) s_q[i] <= s_new[i];
      if (save_u)     for (int i = 0; i < NU; i++)      u_q[i] <= u_new[i];
    end
  end

endmodule
