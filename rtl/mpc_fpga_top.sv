// mpc_fpga_top: real-time embedded MPC loop for a two-input, two-output plant
// (a quadruple water tank: two pumps, two measured tank levels).
//
// Signal chain, sequenced by master_fsm once per control period:
//   PMOD AD1 #0 (setpoints r1, r2) and PMOD AD1 #1 (level sensors y1, y2),
//   both sampling continuously at 95.1 kHz
//   -> four fxp_scaler (12-bit code -> Q8.8 volts)
//   -> mpc_controller (observer, register stack, primal-dual QP solver)
//   -> two fxp_descaler (Q8.8 -> 12-bit code)
//   -> pmod_da2_ctrl (two DAC121S101 outputs driving the pumps).
// A control cycle starts right after reset and then every CTRL_PERIOD clocks
// (5 s). Its length is about one ADC period plus the MPC latency plus one DAC
// frame; at the default sizes (horizon N = 10) about 0.85 M clocks.
// Problem data is loaded through the cfg port (cfg_sel 0: observer matrix,
// 1: QP solver memory) before the first cycle; cycles that start before it is
// loaded compute with whatever the memories hold. The module split follows the
// document; using two PMOD AD1 for the four analog inputs is this design's
// reading of it.
module mpc_fpga_top
  import mpc_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV  = 1052,         // 95.1 kHz at 100 MHz
  parameter int unsigned CTRL_PERIOD = 500_000_000,  // 5 s at 100 MHz
  parameter int unsigned N    = 10,
  parameter int unsigned NX   = 4,
  parameter int unsigned NU   = 2,
  parameter int unsigned NY   = 2,
  parameter int unsigned ITER = 100,
  localparam int unsigned NZ  = (NU + NX) * N,
  localparam int unsigned NL  = NX * N,
  localparam int unsigned NP  = NX + 2 * NY + 1,
  localparam int unsigned AW  = $clog2(NZ * (NZ + NL) + NL * NZ + (NZ + NL) * NP + 2 * NZ)
) (
  input  logic          clk,
  input  logic          rst,
  // PMOD AD1 #0 (setpoints) and #1 (sensors)
  output logic [1:0]    ad_cs_n,
  output logic [1:0]    ad_sclk,
  input  logic [1:0]    ad_sdata [2],
  // PMOD DA2
  output logic          da_sync_n,
  output logic          da_sclk,
  output logic [1:0]    da_din,
  // problem data
  input  logic          cfg_we,
  input  logic          cfg_sel,
  input  logic [AW-1:0] cfg_addr,
  input  coef_t         cfg_data,
  // status
  output q88_t          u_q88 [2],
  output q88_t          y_q88 [2],
  output q88_t          r_q88 [2],
  output q88_t          est_q88 [NX + NY],  // observer estimate [x; d]
  output logic          busy,               // MPC or DAC transfer running
  output logic          cycle_done,
  output logic          overrun,
  output logic [2:0]    fsm_state
);

  // The analog interface has two channels in and two out.
  initial assert (NU == 2 && NY == 2) else $error("PMOD wiring supports NU = NY = 2");

  logic  adc_en, scale_en, mpc_start, descale_en, dac_enable;
  logic  mpc_done, dac_done, dac_busy;
  logic [1:0] ad_done;
  logic [3:0] sc_valid;
  logic [1:0] ds_valid;
  code_t sp_code [2];
  code_t y_code  [2];
  code_t da_code [2];
  q88_t  u_ctrl [NU];
  q88_t  s_est  [NX + NY];
  logic  mpc_busy;

  master_fsm #(.CTRL_PERIOD(CTRL_PERIOD)) u_master (
    .clk, .rst,
    .adc_en,
    .adc_done      (&ad_done),
    .scale_en,
    .scale_valid   (&sc_valid),
    .mpc_start,
    .mpc_done,
    .descale_en,
    .descale_valid (&ds_valid),
    .dac_enable,
    .dac_done,
    .cycle_done,
    .overrun,
    .state         (fsm_state)
  );

  pmod_ad1_ctrl #(.SAMPLE_DIV(SAMPLE_DIV)) u_ad_sp (
    .clk, .rst, .en(adc_en),
    .cs_n(ad_cs_n[0]), .sclk(ad_sclk[0]), .sdata(ad_sdata[0]),
    .sample(sp_code), .done(ad_done[0])
  );

  pmod_ad1_ctrl #(.SAMPLE_DIV(SAMPLE_DIV)) u_ad_y (
    .clk, .rst, .en(adc_en),
    .cs_n(ad_cs_n[1]), .sclk(ad_sclk[1]), .sdata(ad_sdata[1]),
    .sample(y_code), .done(ad_done[1])
  );

  for (genvar k = 0; k < 2; k++) begin : g_ch
    fxp_scaler u_sc_r (
      .clk, .rst, .en(scale_en), .sample(sp_code[k]), .q88(r_q88[k]), .valid(sc_valid[k])
    );
    fxp_scaler u_sc_y (
      .clk, .rst, .en(scale_en), .sample(y_code[k]), .q88(y_q88[k]), .valid(sc_valid[2+k])
    );
    fxp_descaler u_ds (
      .clk, .rst, .en(descale_en), .q88(u_ctrl[k]), .code(da_code[k]), .valid(ds_valid[k])
    );
  end

  mpc_controller #(.N(N), .NX(NX), .NU(NU), .NY(NY), .ITER(ITER)) u_mpc (
    .clk, .rst, .mpc_start,
    .y(y_q88), .r(r_q88),
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
    .u(u_ctrl), .s_est, .mpc_done, .busy(mpc_busy)
  );

  assign u_q88   = u_ctrl;
  assign est_q88 = s_est;
  assign busy    = mpc_busy | dac_busy;

  pmod_da2_ctrl u_da (
    .clk, .rst, .dac_enable, .code(da_code),
    .sync_n(da_sync_n), .sclk(da_sclk), .din(da_din),
    .busy(dac_busy), .done(dac_done)
  );

endmodule
