// master_fsm: central sequencer of the real-time control loop.
//
// Every CTRL_PERIOD clocks (5 s at 100 MHz, the plant's sampling time) a
// control cycle runs the modules one after another, as the document's master
// controller does: it waits for a fresh pair of ADC frames, enables the
// scalers, raises MPC-START and waits for MPC-DONE, enables the de-scalers,
// raises DAC-ENABLE and waits for the DAC controller to finish. Each enable is
// a one-clock pulse issued only after the upstream module has reported its
// result valid, so no stage reads data that is still changing.
// The ADC controllers run continuously at their own sampling rate once reset
// is released (`adc_en`); the master only waits for the next completed frame.
// The first control cycle starts right after reset. A tick that arrives while
// a cycle is still running is kept and served when the FSM returns to idle;
// a second such tick is dropped and reported on `overrun`.
// The sequence follows the document; tick handling is this design's choice.
module master_fsm #(
  parameter int unsigned CTRL_PERIOD = 500_000_000  // clocks per control cycle
) (
  input  logic       clk,
  input  logic       rst,
  output logic       adc_en,
  input  logic       adc_done,
  output logic       scale_en,
  input  logic       scale_valid,
  output logic       mpc_start,
  input  logic       mpc_done,
  output logic       descale_en,
  input  logic       descale_valid,
  output logic       dac_enable,
  input  logic       dac_done,
  output logic       cycle_done,
  output logic       overrun,
  output logic [2:0] state
);

  typedef enum logic [2:0] {
    S_IDLE, S_SAMPLE, S_SCALE, S_MPC, S_DESCALE, S_DAC
  } state_e;

  state_e st;
  localparam int unsigned TW = $clog2(CTRL_PERIOD);
  logic [TW-1:0] tick_cnt;
  logic tick, pending;

  assign tick  = (tick_cnt == '0);
  assign state = st;

  always_ff @(posedge clk) begin
    if (rst) tick_cnt <= '0;
    else if (tick_cnt == TW'(CTRL_PERIOD - 1)) tick_cnt <= '0;
    else tick_cnt <= tick_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      adc_en     <= 1'b0;
      pending    <= 1'b0;
      scale_en   <= 1'b0;
      mpc_start  <= 1'b0;
      descale_en <= 1'b0;
      dac_enable <= 1'b0;
      cycle_done <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      adc_en     <= 1'b1;
      scale_en   <= 1'b0;
      mpc_start  <= 1'b0;
      descale_en <= 1'b0;
      dac_enable <= 1'b0;
      cycle_done <= 1'b0;
      overrun    <= tick && pending && st != S_IDLE;
      if (tick) pending <= 1'b1;
      unique case (st)
        S_IDLE:
          if (pending || tick) begin
            pending <= 1'b0;
            st      <= S_SAMPLE;
          end
        S_SAMPLE:
          if (adc_done) begin
            scale_en <= 1'b1;
            st       <= S_SCALE;
          end
        S_SCALE:
          if (scale_valid) begin
            mpc_start <= 1'b1;
            st        <= S_MPC;
          end
        S_MPC:
          if (mpc_done) begin
            descale_en <= 1'b1;
            st         <= S_DESCALE;
          end
        S_DESCALE:
          if (descale_valid) begin
            dac_enable <= 1'b1;
            st         <= S_DAC;
          end
        S_DAC:
          if (dac_done) begin
            cycle_done <= 1'b1;
            st         <= S_IDLE;
          end
        default: st <= S_IDLE;
      endcase
    end
  end

  // At most one enable pulse at a time.
  assert property (@(posedge clk) disable iff (rst)
    $onehot0({scale_en, mpc_start, descale_en, dac_enable}));

endmodule
