// mpc_controller_tb: closed-loop style test of the MPC block at horizon N = 3
// with ITER = 30 on the quadruple-tank problem. For a series of runs with
// random measured levels and setpoints it recomputes, with the integer
// reference models, the observer update (fed with the previous estimate and
// previous moves, as the register stack must provide them) and the QP solve,
// and checks the new estimate, the control moves and the MPC-START to
// MPC-DONE latency (observer + solver + 7 clocks).
module mpc_controller_tb;
  import mpc_pkg::*;
  import mpc_tb_pkg::*;
  localparam int N = 3, NX = 4, NU = 2, NY = 2, ITER = 30;
  localparam int NS = NX + NY, NV = NS + NU + NY + 1;
  localparam int NZ = (NU + NX) * N, NL = NX * N, NP = NX + 2 * NY + 1;
  localparam int MEM_WORDS = NZ * (NZ + NL) + NL * NZ + (NZ + NL) * NP;
  localparam int AW = $clog2(MEM_WORDS + 2 * NZ);
  localparam int SOLVE = (NZ + NL) * NP + 2 + ITER * (NZ * (NZ + NL) + NL * NZ + 4);
  localparam int LAT = NS * NV + SOLVE + 7;

  logic clk = 0, rst = 1, mpc_start = 0, cfg_we = 0, cfg_sel = 0, mpc_done, busy;
  logic [AW-1:0] cfg_addr = '0;
  coef_t cfg_data = '0;
  q88_t y [NY], r [NY], u [NU], s_est [NS];
  int checks = 0, failures = 0, clips, total_clips = 0, feedback = 0;
  int mem[], zlo[], zhi[], om[], v[], s[], th[], z[], lam[];
  int s_prev[NS], u_prev[NU];
  longint cyc = 0, t0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mpc_controller #(.N(N), .NX(NX), .NU(NU), .NY(NY), .ITER(ITER)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input bit sel, input int a, input int d);
    @(posedge clk);
    cfg_we <= 1; cfg_sel <= sel; cfg_addr <= AW'(a); cfg_data <= coef_t'(d);
  endtask

  initial begin
    foreach (y[k]) y[k] = '0;
    foreach (r[k]) r[k] = '0;
    foreach (s_prev[k]) s_prev[k] = 0;
    foreach (u_prev[k]) u_prev[k] = 0;
    build_tank_data(N, mem, zlo, zhi, om);
    // problem data is written while reset is held
    for (int a = 0; a < NS * NV; a++) wr(0, a, om[a]);
    for (int a = 0; a < MEM_WORDS; a++) wr(1, a, mem[a]);
    for (int a = 0; a < NZ; a++) wr(1, MEM_WORDS + a, zlo[a]);
    for (int a = 0; a < NZ; a++) wr(1, MEM_WORDS + NZ + a, zhi[a]);
    @(posedge clk);
    cfg_we <= 0;
    rst <= 0;
    repeat (3) @(posedge clk);
    for (int run = 0; run < 8; run++) begin
      foreach (y[k]) y[k] = q88_t'($urandom_range(1100, 0));
      foreach (r[k]) r[k] = q88_t'($urandom_range(1100, 0));
      @(posedge clk);
      mpc_start <= 1; t0 = cyc;
      @(posedge clk);
      mpc_start <= 0;
      while (!mpc_done) @(posedge clk);
      check(cyc - t0 == LAT + 2, $sformatf("latency %0d exp %0d", cyc - t0, LAT + 2));
      // reference
      v = new[NV];
      for (int k = 0; k < NS; k++) v[k] = s_prev[k];
      for (int k = 0; k < NU; k++) v[NS+k] = u_prev[k];
      for (int k = 0; k < NY; k++) v[NS+NU+k] = y[k];
      v[NV-1] = 256;
      obs_ref(om, NS, NV, v, s);
      th = new[NP];
      for (int k = 0; k < NS; k++) th[k] = s[k];
      for (int k = 0; k < NY; k++) th[NS+k] = r[k];
      th[NP-1] = 256;
      qp_ref(mem, zlo, zhi, th, NZ, NL, NP, ITER, z, lam, clips);
      total_clips += clips;
      for (int k = 0; k < NS; k++) check(int'(s_est[k]) == s[k], $sformatf("run %0d s[%0d]=%0d exp %0d", run, k, s_est[k], s[k]));
      for (int k = 0; k < NU; k++) check(int'(u[k]) == z[k], $sformatf("run %0d u[%0d]=%0d exp %0d", run, k, u[k], z[k]));
      for (int k = 0; k < NU; k++) if (u_prev[k] != 0) feedback++;
      for (int k = 0; k < NS; k++) s_prev[k] = s[k];
      for (int k = 0; k < NU; k++) u_prev[k] = z[k];
      repeat ($urandom_range(5, 0)) @(posedge clk);
    end
    check(total_clips > 0, "projection never active");
    check(feedback > 0, "previous moves never fed back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * LAT + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
