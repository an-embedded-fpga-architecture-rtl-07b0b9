// mpc_controller: the model predictive control block (the "control algorithm"
// of the loop), built from an MPC FSM, a state observer, a register stack and
// a primal-dual QP solver.
//
// On `mpc_start` the observer updates the estimate [x; d] from the measured
// levels y, the previous estimate and the previous moves held in the register
// stack; the stack saves the new estimate; the solver then solves the QP for
// the parameter vector [x; d; r] and its first move u0 is saved in the stack
// and presented on `u`. `mpc_done` pulses when `u` is valid. Inputs and
// outputs are Q8.8 volts. `mpc_done` rises observer time (NS*NV + 1) plus
// solver time plus 5 clock edges after the edge that samples `mpc_start`
// (841,375 clocks at the default sizes, 8.4 ms at 100 MHz).
// Problem data is written through one cfg port: cfg_sel = 0 addresses the
// observer matrix, cfg_sel = 1 the solver memory (see pd_qp_solver for its
// layout). The structure follows the document's controller architecture;
// the configuration port is this design's choice.
module mpc_controller
  import mpc_pkg::*;
#(
  parameter int unsigned N    = 10,
  parameter int unsigned NX   = 4,
  parameter int unsigned NU   = 2,
  parameter int unsigned NY   = 2,
  parameter int unsigned ITER = 100,
  localparam int unsigned NS  = NX + NY,
  localparam int unsigned NZ  = (NU + NX) * N,
  localparam int unsigned NL  = NX * N,
  localparam int unsigned NP  = NX + 2 * NY + 1,
  localparam int unsigned AW  = $clog2(NZ * (NZ + NL) + NL * NZ + (NZ + NL) * NP + 2 * NZ),
  localparam int unsigned OAW = $clog2(NS * (NS + NU + NY + 1))
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          mpc_start,
  input  q88_t          y [NY],
  input  q88_t          r [NY],
  input  logic          cfg_we,
  input  logic          cfg_sel,
  input  logic [AW-1:0] cfg_addr,
  input  coef_t         cfg_data,
  output q88_t          u [NU],
  output q88_t          s_est [NS],
  output logic          mpc_done,
  output logic          busy
);

  logic obs_start, obs_done, obs_busy;
  logic save_state, qp_start, qp_done, qp_busy, save_u, fsm_busy;
  q88_t s_new [NS];
  q88_t s_q   [NS];
  q88_t u_q   [NU];
  q88_t u_new [NU];
  q88_t theta [NX + 2 * NY];

  always_comb begin
    for (int k = 0; k < NS; k++) theta[k]      = s_q[k];
    for (int k = 0; k < NY; k++) theta[NS + k] = r[k];
  end

  assign u     = u_q;
  assign s_est = s_q;
  assign busy  = fsm_busy | obs_busy | qp_busy;

  mpc_fsm u_fsm (
    .clk, .rst, .mpc_start,
    .obs_start, .obs_done,
    .stack_save_state (save_state),
    .qp_start, .qp_done,
    .stack_save_u     (save_u),
    .mpc_done,
    .busy             (fsm_busy)
  );

  state_observer #(.NX(NX), .NU(NU), .NY(NY)) u_obs (
    .clk, .rst,
    .start    (obs_start),
    .s_in     (s_q),
    .u_in     (u_q),
    .y_in     (y),
    .cfg_we   (cfg_we && !cfg_sel),
    .cfg_addr (cfg_addr[OAW-1:0]),
    .cfg_data,
    .s_out    (s_new),
    .done     (obs_done),
    .busy     (obs_busy)
  );

  register_stack #(.NX(NX), .NU(NU), .NY(NY)) u_stack (
    .clk, .rst,
    .save_state, .s_new,
    .save_u, .u_new,
    .s_q, .u_q
  );

  pd_qp_solver #(.N(N), .NX(NX), .NU(NU), .NY(NY), .ITER(ITER)) u_qp (
    .clk, .rst,
    .start    (qp_start),
    .theta,
    .cfg_we   (cfg_we && cfg_sel),
    .cfg_addr,
    .cfg_data,
    .u_out    (u_new),
    .done     (qp_done),
    .busy     (qp_busy)
  );

endmodule
