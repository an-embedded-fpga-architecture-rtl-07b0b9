// pd_qp_solver_tb: runs the primal-dual solver at horizon N = 3 with ITER = 30
// on (a) the quadruple-tank problem for random estimates and setpoints and
// (b) random problem data with tight bounds, and compares the first move u0
// (and, through it, every iteration) with an integer reference model of the
// iteration. Checks the solve time against
//   (NZ+NL)*NP + 2 + ITER*(NZ*(NZ+NL) + NL*NZ + 4) clocks,
// that u0 respects its bounds, and that the projection was active in some run.
module pd_qp_solver_tb;
  import mpc_pkg::*;
  import mpc_tb_pkg::*;
  localparam int N = 3, NX = 4, NU = 2, NY = 2, ITER = 30;
  localparam int NZ = (NU + NX) * N, NL = NX * N, NTH = NX + 2 * NY, NP = NTH + 1;
  localparam int MEM_WORDS = NZ * (NZ + NL) + NL * NZ + (NZ + NL) * NP;
  localparam int AW = $clog2(MEM_WORDS + 2 * NZ);
  localparam int SOLVE = (NZ + NL) * NP + 2 + ITER * (NZ * (NZ + NL) + NL * NZ + 4);

  logic clk = 0, rst = 1, start = 0, cfg_we = 0, done, busy;
  logic [AW-1:0] cfg_addr = '0;
  coef_t cfg_data = '0;
  q88_t theta [NTH], u_out [NU];
  int checks = 0, failures = 0, total_clips = 0;
  int mem[], zlo[], zhi[], om[], th[], z[], lam[], clips;
  longint cyc = 0, t0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pd_qp_solver #(.N(N), .NX(NX), .NU(NU), .NY(NY), .ITER(ITER)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load();
    for (int a = 0; a < MEM_WORDS + 2 * NZ; a++) begin
      @(posedge clk);
      cfg_we   <= 1;
      cfg_addr <= AW'(a);
      if (a < MEM_WORDS)            cfg_data <= coef_t'(mem[a]);
      else if (a < MEM_WORDS + NZ)  cfg_data <= coef_t'(zlo[a - MEM_WORDS]);
      else                          cfg_data <= coef_t'(zhi[a - MEM_WORDS - NZ]);
    end
    @(posedge clk);
    cfg_we <= 0;
  endtask

  task automatic run_solve(input int range);
    th = new[NP];
    for (int k = 0; k < NTH; k++) begin
      th[k] = $urandom_range(2 * range, 0) - range;
      theta[k] = q88_t'(th[k]);
    end
    th[NP-1] = 256;
    @(posedge clk);
    start <= 1; t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    check(cyc - t0 == SOLVE + 2, $sformatf("solve time %0d exp %0d", cyc - t0, SOLVE + 2));
    qp_ref(mem, zlo, zhi, th, NZ, NL, NP, ITER, z, lam, clips);
    total_clips += clips;
    for (int k = 0; k < NU; k++) begin
      check(int'(u_out[k]) == z[k], $sformatf("u[%0d]=%0d exp %0d", k, u_out[k], z[k]));
      check(int'(u_out[k]) >= zlo[k] && int'(u_out[k]) <= zhi[k], "u0 outside its bounds");
    end
  endtask

  initial begin
    foreach (theta[k]) theta[k] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    build_tank_data(N, mem, zlo, zhi, om);
    load();
    repeat (6) run_solve(600);
    // random data
    for (int t = 0; t < 3; t++) begin
      foreach (mem[i]) mem[i] = int'($urandom_range(8191, 0)) - 4096;
      foreach (zlo[i]) begin zlo[i] = -int'($urandom_range(400, 0)); zhi[i] = $urandom_range(400, 0); end
      load();
      repeat (2) run_solve(2000);
    end
    check(total_clips > 0, "projection never active");
    $display("clipped rows: %0d", total_clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14 * SOLVE + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
