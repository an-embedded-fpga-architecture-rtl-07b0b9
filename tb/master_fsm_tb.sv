// master_fsm_tb: drives the master FSM with responder models that answer each
// enable after a random delay, and checks that the enables come in the order
// ADC frame -> scale -> MPC-START -> de-scale -> DAC-ENABLE, each only after
// the upstream module answered, that one cycle_done ends each cycle, that
// cycles start every CTRL_PERIOD clocks (the first right after reset), and
// that a cycle longer than two periods reports an overrun.
module master_fsm_tb;
  localparam int PERIOD = 400;
  logic clk = 0, rst = 1;
  logic adc_en, adc_done, scale_en, scale_valid, mpc_start, mpc_done;
  logic descale_en, descale_valid, dac_enable, dac_done, cycle_done, overrun;
  logic [2:0] state;
  int checks = 0, failures = 0;
  int step = 0;          // 0 wait adc, 1 scale, 2 mpc, 3 descale, 4 dac
  int cycles = 0, overruns = 0;
  int mpc_delay = 50;
  longint cyc = 0;
  longint starts [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  master_fsm #(.CTRL_PERIOD(PERIOD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // ADC frames every 37 clocks while enabled
  always @(posedge clk) begin
    adc_done <= adc_en && (cyc % 37 == 0);
  end

  // responders with one-shot delays
  initial begin
    scale_valid = 0; mpc_done = 0; descale_valid = 0; dac_done = 0;
    wait (!rst);
    forever begin
      @(posedge clk);
      if (scale_en) begin
        check(step == 1, "scale_en out of order");
        step = 2;
        scale_valid <= 1; @(posedge clk); scale_valid <= 0;
      end else if (mpc_start) begin
        check(step == 2, "mpc_start out of order");
        repeat (mpc_delay) @(posedge clk);
        step = 3;
        mpc_done <= 1; @(posedge clk); mpc_done <= 0;
      end else if (descale_en) begin
        check(step == 3, "descale_en out of order");
        step = 4;
        descale_valid <= 1; @(posedge clk); descale_valid <= 0;
      end else if (dac_enable) begin
        check(step == 4, "dac_enable out of order");
        repeat (20) @(posedge clk);
        step = 5;
        dac_done <= 1; @(posedge clk); dac_done <= 0;
      end
    end
  end

  always @(posedge clk) begin
    if (!rst && state == 3'd1 && step == 0 && adc_done) step = 1;
    if (cycle_done && !rst) begin
      check(step == 5, "cycle_done before DAC finished");
      cycles++;
      step = 0;
    end
    if (overrun && !rst) overruns++;
  end

  // record when each cycle leaves idle
  logic [2:0] state_q;
  always @(posedge clk) begin
    state_q <= state;
    if (!rst && state_q == 3'd0 && state == 3'd1) starts.push_back(cyc);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (cycles == 4);
    for (int i = 1; i < 4; i++) check(starts[i] - starts[i-1] == PERIOD, $sformatf("cycle spacing %0d", starts[i] - starts[i-1]));
    check(starts[0] <= 4, "first cycle not right after reset");
    check(overruns == 0, "spurious overrun");
    mpc_delay = 2 * PERIOD + 10;   // a long solve: two ticks arrive meanwhile
    wait (cycles == 6);
    check(overruns >= 1, "overrun not reported");
    $display("cycles=%0d overruns=%0d", cycles, overruns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
