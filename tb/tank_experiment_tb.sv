// tank_experiment_tb: the closed-loop tank experiment on the full-size loop
// (horizon N = 10, 100 iterations, 95.1 kHz ADC). A linear quadruple-tank
// model in the testbench closes the loop: each control cycle its levels are
// converted to sensor voltages (with a constant 0.1 V sensor offset on tank 1
// that the disturbance observer must absorb), quantised by the AD7476A
// models, and the pump voltages the DAC models receive drive the model for
// the next 5 s step. Setpoint 1 is fixed at 1.3 V, setpoint 2 is a square
// wave between 1.8 V and 0 V with a 60 s period (12 control cycles), and the
// run lasts 140 s (28 control cycles). The control period is shortened to
// 900,000 clocks so that a control cycle (about 842,000 clocks) still fits;
// nothing else differs from the defaults.
// Every cycle the moves are checked bit for bit against the reference models
// and the pump voltages against their 0..3.3 V limits; at the end of each
// half-period the tank 1 level must have settled near its setpoint.
module tank_experiment_tb;
  import mpc_pkg::*;
  import mpc_tb_pkg::*;
  localparam int CTRL_PERIOD = 900_000, N = 10, ITER = 100, CYCLES = 28;
  localparam int NX = 4, NU = 2, NY = 2;
  localparam int NS = NX + NY, NV = NS + NU + NY + 1;
  localparam int NZ = (NU + NX) * N, NL = NX * N, NP = NX + 2 * NY + 1;
  localparam int MEM_WORDS = NZ * (NZ + NL) + NL * NZ + (NZ + NL) * NP;
  localparam int AW = $clog2(MEM_WORDS + 2 * NZ);

  logic clk = 0, rst = 1;
  logic [1:0] ad_cs_n, ad_sclk;
  logic [1:0] ad_sdata [2];
  logic da_sync_n, da_sclk;
  logic [1:0] da_din;
  logic cfg_we = 0, cfg_sel = 0;
  logic [AW-1:0] cfg_addr = '0;
  coef_t cfg_data = '0;
  q88_t u_q88 [2], y_q88 [2], r_q88 [2], est_q88 [NS];
  logic cycle_done, overrun, busy;
  logic [2:0] fsm_state;

  logic [11:0] sp_code [2], y_code [2];
  logic [11:0] dac_out [2];
  logic [1:0]  dac_pd [2];
  int ad_frames [4], dac_frames [2], dac_bad [2];

  int checks = 0, failures = 0, n_clip = 0, n_settled = 0;
  int mem[], zlo[], zhi[], om[], v[], s[], th[], z[], lam[], clips;
  int s_prev[NS], u_prev[NU];
  real a[4][4], b[4][2], c[2][4];
  real xp[4], xn[4], yv[2], uv[2], rv[2];

  always #5 clk = ~clk;

  mpc_fpga_top #(.CTRL_PERIOD(CTRL_PERIOD)) dut (.*);

  ad7476a_model ad_r1 (.cs_n(ad_cs_n[0]), .sclk(ad_sclk[0]), .code(sp_code[0]), .sdata(ad_sdata[0][0]), .frames(ad_frames[0]));
  ad7476a_model ad_r2 (.cs_n(ad_cs_n[0]), .sclk(ad_sclk[0]), .code(sp_code[1]), .sdata(ad_sdata[0][1]), .frames(ad_frames[1]));
  ad7476a_model ad_y1 (.cs_n(ad_cs_n[1]), .sclk(ad_sclk[1]), .code(y_code[0]),  .sdata(ad_sdata[1][0]), .frames(ad_frames[2]));
  ad7476a_model ad_y2 (.cs_n(ad_cs_n[1]), .sclk(ad_sclk[1]), .code(y_code[1]),  .sdata(ad_sdata[1][1]), .frames(ad_frames[3]));
  dac121s101_model da1 (.sync_n(da_sync_n), .sclk(da_sclk), .din(da_din[0]), .vout(dac_out[0]), .pd(dac_pd[0]), .frames(dac_frames[0]), .bad_frames(dac_bad[0]));
  dac121s101_model da2 (.sync_n(da_sync_n), .sclk(da_sclk), .din(da_din[1]), .vout(dac_out[1]), .pd(dac_pd[1]), .frames(dac_frames[1]), .bad_frames(dac_bad[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input bit sel, input int ad, input int d);
    @(posedge clk);
    cfg_we <= 1; cfg_sel <= sel; cfg_addr <= AW'(ad); cfg_data <= coef_t'(d);
  endtask

  function automatic logic [11:0] adc_code(input real x);
    real t;
    t = x * 4096.0 / 3.3;
    if (t < 0.0) return 12'd0;
    if (t > 4095.0) return 12'd4095;
    return 12'($rtoi(t));
  endfunction

  function automatic int scale(input logic [11:0] cd);
    return int'((longint'(cd) * 13517) >>> 16);
  endfunction

  task automatic sense();
    for (int j = 0; j < 2; j++) begin
      yv[j] = 0.0;
      for (int k = 0; k < 4; k++) yv[j] += c[j][k] * xp[k];
    end
    yv[0] += 0.1;   // sensor offset on tank 1
    y_code[0] = adc_code(yv[0]);
    y_code[1] = adc_code(yv[1]);
  endtask

  initial begin
    tank_abc(a, b, c);
    foreach (xp[k]) xp[k] = 0.0;
    foreach (s_prev[k]) s_prev[k] = 0;
    foreach (u_prev[k]) u_prev[k] = 0;
    rv[0] = 1.3; rv[1] = 1.8;
    sp_code[0] = adc_code(rv[0]);
    sp_code[1] = adc_code(rv[1]);
    sense();
    build_tank_data(N, mem, zlo, zhi, om);
    for (int i = 0; i < NS * NV; i++) wr(0, i, om[i]);
    for (int i = 0; i < MEM_WORDS; i++) wr(1, i, mem[i]);
    for (int i = 0; i < NZ; i++) wr(1, MEM_WORDS + i, zlo[i]);
    for (int i = 0; i < NZ; i++) wr(1, MEM_WORDS + NZ + i, zhi[i]);
    @(posedge clk);
    cfg_we <= 0;
    rst <= 0;
    for (int cy = 0; cy < CYCLES; cy++) begin
      @(posedge clk);
      while (!cycle_done) @(posedge clk);
      #1;
      v = new[NV];
      for (int k = 0; k < NS; k++) v[k] = s_prev[k];
      for (int k = 0; k < NU; k++) v[NS+k] = u_prev[k];
      for (int k = 0; k < NY; k++) v[NS+NU+k] = scale(y_code[k]);
      v[NV-1] = 256;
      obs_ref(om, NS, NV, v, s);
      th = new[NP];
      for (int k = 0; k < NS; k++) th[k] = s[k];
      for (int k = 0; k < NY; k++) th[NS+k] = scale(sp_code[k]);
      th[NP-1] = 256;
      qp_ref(mem, zlo, zhi, th, NZ, NL, NP, ITER, z, lam, clips);
      n_clip += clips;
      for (int k = 0; k < 2; k++) begin
        check(int'(u_q88[k]) == z[k], $sformatf("cycle %0d u[%0d]=%0d exp %0d", cy, k, u_q88[k], z[k]));
        uv[k] = real'(dac_out[k]) * 3.3 / 4096.0;
        check(uv[k] >= 0.0 && uv[k] <= 3.3, "pump voltage outside 0..3.3 V");
      end
      for (int k = 0; k < NS; k++) s_prev[k] = s[k];
      for (int k = 0; k < NU; k++) u_prev[k] = z[k];
      $display("t=%4.0f s  r=(%4.2f %4.2f)  y=(%5.3f %5.3f)  u=(%4.2f %4.2f)  d_est=(%5.3f %5.3f)",
               cy * 5.0, rv[0], rv[1], yv[0], yv[1], uv[0], uv[1], s[4] / 256.0, s[5] / 256.0);
      // tank 1 settles near 1.3 V by the end of each half-period
      if (cy % 6 == 5) begin
        check(yv[0] > 1.3 - 0.15 && yv[0] < 1.3 + 0.15, $sformatf("tank 1 at %f V at t=%0d s", yv[0], cy * 5));
        n_settled++;
      end
      // plant step of 5 s with the applied pump voltages
      for (int i = 0; i < 4; i++) begin
        xn[i] = 0.0;
        for (int k = 0; k < 4; k++) xn[i] += a[i][k] * xp[k];
        for (int k = 0; k < 2; k++) xn[i] += b[i][k] * uv[k];
      end
      xp = xn;
      sense();
      rv[1] = (((cy + 1) / 6) % 2 == 0) ? 1.8 : 0.0;
      sp_code[1] = adc_code(rv[1]);
    end
    check(n_clip > 0, "input constraints never active");
    check(dac_bad[0] == 0 && dac_bad[1] == 0, "DAC frame errors");
    check(overrun == 0, "control cycle overran its period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((CYCLES + 2) * CTRL_PERIOD + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
