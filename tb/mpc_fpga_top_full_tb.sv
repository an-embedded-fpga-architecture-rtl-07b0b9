// mpc_fpga_top_full_tb: one complete control cycle of the loop with every
// parameter of mpc_fpga_top at its default (horizon N = 10, 100 solver
// iterations, 95.1 kHz ADC sampling, 5 s control period). The quadruple-tank
// problem data (9,420 solver words and the observer matrix) is loaded while
// reset is held; the first control cycle then starts at once. The testbench
// recomputes scaling, observer, QP solve and de-scaling with its reference
// models and checks the scaled inputs, the moves, the DAC codes and the
// length of the cycle (one ADC period at most, plus the MPC latency, plus one
// DAC frame). About 0.85 million clocks.
module mpc_fpga_top_full_tb;
  import mpc_pkg::*;
  import mpc_tb_pkg::*;
  localparam int SAMPLE_DIV = 1052, CTRL_PERIOD = 500_000_000, N = 10, ITER = 100, CYCLES = 1;
  localparam int NX = 4, NU = 2, NY = 2;
  localparam int NS = NX + NY, NV = NS + NU + NY + 1;
  localparam int NZ = (NU + NX) * N, NL = NX * N, NP = NX + 2 * NY + 1;
  localparam int MEM_WORDS = NZ * (NZ + NL) + NL * NZ + (NZ + NL) * NP;
  localparam int AW = $clog2(MEM_WORDS + 2 * NZ);
  localparam int SOLVE = (NZ + NL) * NP + 2 + ITER * (NZ * (NZ + NL) + NL * NZ + 4);

  logic clk = 0, rst = 1;
  logic [1:0] ad_cs_n, ad_sclk;
  logic [1:0] ad_sdata [2];
  logic da_sync_n, da_sclk;
  logic [1:0] da_din;
  logic cfg_we = 0, cfg_sel = 0;
  logic [AW-1:0] cfg_addr = '0;
  coef_t cfg_data = '0;
  q88_t u_q88 [2], y_q88 [2], r_q88 [2];
  logic cycle_done, overrun, busy;
  q88_t est_q88 [6];
  logic [2:0] fsm_state;

  logic [11:0] sp_code [2], y_code [2];
  logic [11:0] dac_out [2];
  logic [1:0]  dac_pd [2];
  int ad_frames [4], dac_frames [2], dac_bad [2];

  int checks = 0, failures = 0;
  int n_clip = 0, n_clamp = 0, n_feedback = 0, n_scaled = 0;
  int mem[], zlo[], zhi[], om[], v[], s[], th[], z[], lam[], clips;
  int s_prev[NS], u_prev[NU];
  longint cyc = 0;
  longint starts [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mpc_fpga_top dut (.*);

  ad7476a_model ad_r1 (.cs_n(ad_cs_n[0]), .sclk(ad_sclk[0]), .code(sp_code[0]), .sdata(ad_sdata[0][0]), .frames(ad_frames[0]));
  ad7476a_model ad_r2 (.cs_n(ad_cs_n[0]), .sclk(ad_sclk[0]), .code(sp_code[1]), .sdata(ad_sdata[0][1]), .frames(ad_frames[1]));
  ad7476a_model ad_y1 (.cs_n(ad_cs_n[1]), .sclk(ad_sclk[1]), .code(y_code[0]),  .sdata(ad_sdata[1][0]), .frames(ad_frames[2]));
  ad7476a_model ad_y2 (.cs_n(ad_cs_n[1]), .sclk(ad_sclk[1]), .code(y_code[1]),  .sdata(ad_sdata[1][1]), .frames(ad_frames[3]));
  dac121s101_model da1 (.sync_n(da_sync_n), .sclk(da_sclk), .din(da_din[0]), .vout(dac_out[0]), .pd(dac_pd[0]), .frames(dac_frames[0]), .bad_frames(dac_bad[0]));
  dac121s101_model da2 (.sync_n(da_sync_n), .sclk(da_sclk), .din(da_din[1]), .vout(dac_out[1]), .pd(dac_pd[1]), .frames(dac_frames[1]), .bad_frames(dac_bad[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic wr(input bit sel, input int a, input int d);
    @(posedge clk);
    cfg_we <= 1; cfg_sel <= sel; cfg_addr <= AW'(a); cfg_data <= coef_t'(d);
  endtask

  function automatic int scale(input logic [11:0] c);
    return int'((longint'(c) * 13517) >>> 16);
  endfunction

  function automatic int descale(input int q);
    longint t;
    t = (longint'(q) * 19859) >>> 12;
    if (t < 0) return 0;
    if (t > 4095) return 4095;
    return int'(t);
  endfunction

  function automatic logic [11:0] volts(input real x);
    return 12'($rtoi(x * 4096.0 / 3.3));
  endfunction

  logic [2:0] st_q;
  always @(posedge clk) begin
    st_q <= fsm_state;
    if (!rst && st_q == 3'd0 && fsm_state == 3'd1) starts.push_back(cyc);
  end

  initial begin
    int dexp [2];
    foreach (s_prev[k]) s_prev[k] = 0;
    foreach (u_prev[k]) u_prev[k] = 0;
    sp_code[0] = volts(1.3);
    sp_code[1] = volts(1.8);
    y_code[0]  = 12'($urandom_range(2000, 200));
    y_code[1]  = 12'($urandom_range(2000, 200));
    build_tank_data(N, mem, zlo, zhi, om);
    // problem data is written while reset is held
    for (int a = 0; a < NS * NV; a++) wr(0, a, om[a]);
    for (int a = 0; a < MEM_WORDS; a++) wr(1, a, mem[a]);
    for (int a = 0; a < NZ; a++) wr(1, MEM_WORDS + a, zlo[a]);
    for (int a = 0; a < NZ; a++) wr(1, MEM_WORDS + NZ + a, zhi[a]);
    @(posedge clk);
    cfg_we <= 0;
    rst <= 0;
    for (int c = 0; c < CYCLES; c++) begin
      @(posedge clk);
      while (!cycle_done) @(posedge clk);
      #1;
      // reference for this cycle
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
        check(int'(y_q88[k]) == scale(y_code[k]) && int'(r_q88[k]) == scale(sp_code[k]), "scaled inputs");
        n_scaled++;
        check(int'(u_q88[k]) == z[k], $sformatf("cycle %0d u[%0d]=%0d exp %0d", c, k, u_q88[k], z[k]));
        dexp[k] = descale(z[k]);
        if ((longint'(z[k]) * 19859) >>> 12 > 4095) n_clamp++;
        check(int'(dac_out[k]) == dexp[k], $sformatf("cycle %0d dac[%0d]=%0d exp %0d", c, k, dac_out[k], dexp[k]));
        check(dac_pd[k] == 2'b00, "DAC power-down bits");
        if (u_prev[k] != 0) n_feedback++;
      end
      $display("cycle %0d: r=(%0d,%0d) y=(%0d,%0d) u=(%0d,%0d) dac=(%0d,%0d)", c, th[NS], th[NS+1],
               v[NS+NU], v[NS+NU+1], z[0], z[1], dac_out[0], dac_out[1]);
      for (int k = 0; k < NS; k++) s_prev[k] = s[k];
      for (int k = 0; k < NU; k++) u_prev[k] = z[k];
      check(dac_frames[0] == c + 1 && dac_frames[1] == c + 1, "one DAC update per cycle");
      // new inputs for the next cycle: square-wave setpoint 2, new levels
      sp_code[1] = (c % 2 == 1) ? volts(1.8) : 12'd0;
      y_code[0]  = 12'($urandom_range(2000, 200));
      y_code[1]  = 12'($urandom_range(2000, 200));
    end
    check(starts.size() == 1, "exactly one control cycle started");
    check(cyc - starts[0] <= SAMPLE_DIV + NS * NV + SOLVE + 200,
          $sformatf("control cycle took %0d clocks", cyc - starts[0]));
    $display("control cycle length: %0d clocks", cyc - starts[0]);
    check(dac_bad[0] == 0 && dac_bad[1] == 0, "DAC frames with a wrong bit count");
    check(overrun == 0, "overrun");
    $display("mechanisms: adc_frames=%0d scaled=%0d obs_feedback=%0d qp_clips=%0d dac_clamps=%0d dac_updates=%0d",
             ad_frames[2], n_scaled, n_feedback, n_clip, n_clamp, dac_frames[0]);
    check(ad_frames[0] > 0 && ad_frames[2] > 0, "no ADC frames");
    check(dac_frames[0] > 0, "no DAC update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000 + SOLVE + SAMPLE_DIV * 2) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
