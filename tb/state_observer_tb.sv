// state_observer_tb: loads an observer matrix (first the quadruple-tank one,
// then random ones), runs the observer on random estimates, moves and
// measurements, and compares every new estimate with an integer reference
// model. Also checks that `done` comes NS*NV + 3 clocks after `start` is raised.
module state_observer_tb;
  import mpc_pkg::*;
  import mpc_tb_pkg::*;
  localparam int NX = 4, NU = 2, NY = 2, NS = NX + NY, NV = NS + NU + NY + 1;
  logic clk = 0, rst = 1, start = 0, cfg_we = 0, done, busy;
  logic [$clog2(NS*NV)-1:0] cfg_addr = '0;
  coef_t cfg_data = '0;
  q88_t s_in [NS], u_in [NU], y_in [NY], s_out [NS];
  int checks = 0, failures = 0;
  int m[], v[], s[], mem[], zlo[], zhi[];
  longint cyc = 0, t0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  state_observer #(.NX(NX), .NU(NU), .NY(NY)) dut (.*);

  task automatic load(input int mm[]);
    for (int a = 0; a < NS*NV; a++) begin
      @(posedge clk);
      cfg_we <= 1; cfg_addr <= a[$bits(cfg_addr)-1:0]; cfg_data <= coef_t'(mm[a]);
    end
    @(posedge clk);
    cfg_we <= 0;
  endtask

  task automatic run_one(input int range);
    v = new[NV];
    for (int k = 0; k < NS; k++) begin s_in[k] = q88_t'($urandom_range(2*range, 0) - range); v[k] = s_in[k]; end
    for (int k = 0; k < NU; k++) begin u_in[k] = q88_t'($urandom_range(2*range, 0) - range); v[NS+k] = u_in[k]; end
    for (int k = 0; k < NY; k++) begin y_in[k] = q88_t'($urandom_range(2*range, 0) - range); v[NS+NU+k] = y_in[k]; end
    v[NV-1] = 256;
    @(posedge clk);
    start <= 1; t0 = cyc;
    @(posedge clk);
    start <= 0;
    foreach (s_in[k]) s_in[k] <= '0;   // inputs are latched at start
    while (!done) @(posedge clk);
    checks++;
    if (cyc - t0 != NS*NV + 3) begin failures++; $display("FAIL: latency %0d", cyc - t0); end
    obs_ref(m, NS, NV, v, s);
    for (int k = 0; k < NS; k++) begin
      checks++;
      if (int'(s_out[k]) != s[k]) begin failures++; $display("FAIL: s[%0d]=%0d exp %0d", k, s_out[k], s[k]); end
    end
  endtask

  initial begin
    foreach (s_in[k]) s_in[k] = '0;
    foreach (u_in[k]) u_in[k] = '0;
    foreach (y_in[k]) y_in[k] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    build_tank_data(2, mem, zlo, zhi, m);
    load(m);
    repeat (20) run_one(1024);
    for (int t = 0; t < 10; t++) begin
      m = new[NS*NV];
      foreach (m[i]) m[i] = int'($urandom_range(262143, 0)) - 131072;
      load(m);
      repeat (3) run_one(32767);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
