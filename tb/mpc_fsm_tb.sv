// mpc_fsm_tb: checks the MPC FSM's handshake order with observer and solver
// responders of random latency: observer start, state save on
// STATE-OBSERVER-DONE, solver start after the save, control save on solver
// done, then MPC-DONE, each as a single pulse, and nothing while idle.
module mpc_fsm_tb;
  logic clk = 0, rst = 1;
  logic mpc_start = 0, obs_start, obs_done = 0, stack_save_state, qp_start, qp_done = 0;
  logic stack_save_u, mpc_done, busy;
  int checks = 0, failures = 0;
  int step;

  always #5 clk = ~clk;

  mpc_fsm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (step %0d)", what, step); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (obs_start)        begin check(step == 0, "obs_start"); step = 1; end
    if (stack_save_state) begin check(step == 2, "save_state"); step = 3; end
    if (qp_start)         begin check(step == 3 && !stack_save_state, "qp_start before the saved estimate"); step = 4; end
    if (stack_save_u)     begin check(step == 5, "save_u"); step = 6; end
    if (mpc_done)         begin check(step == 6, "mpc_done"); step = 7; end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    for (int run = 0; run < 20; run++) begin
      step = 0;
      @(posedge clk) mpc_start <= 1;
      @(posedge clk) mpc_start <= 0;
      wait (step == 1);
      repeat ($urandom_range(30, 1)) @(posedge clk);
      step = 2;
      obs_done <= 1; @(posedge clk); obs_done <= 0;
      wait (step == 4);
      repeat ($urandom_range(60, 1)) @(posedge clk);
      step = 5;
      qp_done <= 1; @(posedge clk); qp_done <= 0;
      wait (step == 7);
      @(posedge clk);
      check(!busy, "idle after done");
      repeat ($urandom_range(5, 0)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
