// mpc_fsm: dataflow controller inside the MPC block.
//
// It waits for MPC-START from the master FSM, starts the state observer, and
// when the observer reports STATE-OBSERVER-DONE has the register stack save
// the new estimate. It then starts the primal-dual QP solver with that
// estimate; when the solver finishes, the register stack saves the new control
// moves (they feed the observer on the next run) and MPC-DONE is pulsed for
// the master FSM. All start, save and done signals are one-clock pulses; the
// handshake order is the document's, the pulse convention this design's.
// Latency: MPC-DONE rises observer time + solver time + 5 clock edges after
// the edge that samples MPC-START.
module mpc_fsm (
  input  logic clk,
  input  logic rst,
  input  logic mpc_start,
  output logic obs_start,
  input  logic obs_done,
  output logic stack_save_state,
  output logic qp_start,
  input  logic qp_done,
  output logic stack_save_u,
  output logic mpc_done,
  output logic busy
);

  typedef enum logic [2:0] {M_IDLE, M_OBS, M_SAVE, M_QP, M_DONE} mstate_e;
  mstate_e st;

  assign busy = (st != M_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st               <= M_IDLE;
      obs_start        <= 1'b0;
      stack_save_state <= 1'b0;
      qp_start         <= 1'b0;
      stack_save_u     <= 1'b0;
      mpc_done         <= 1'b0;
    end else begin
      obs_start        <= 1'b0;
      stack_save_state <= 1'b0;
      qp_start         <= 1'b0;
      stack_save_u     <= 1'b0;
      mpc_done         <= 1'b0;
      unique case (st)
        M_IDLE: if (mpc_start) begin
          obs_start <= 1'b1;
          st        <= M_OBS;
        end
        M_OBS: if (obs_done) begin
          stack_save_state <= 1'b1;
          st               <= M_SAVE;
        end
        M_SAVE: begin
          // the stack holds the new estimate from this clock on
          qp_start <= 1'b1;
          st       <= M_QP;
        end
        M_QP: if (qp_done) begin
          stack_save_u <= 1'b1;
          st           <= M_DONE;
        end
        M_DONE: begin
          mpc_done <= 1'b1;
          st       <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) mpc_start |-> st == M_IDLE);

endmodule
