// fxp_descaler_tb: sweeps Q8.8 voltages from -2 V to +5 V and random words and
// checks the 12-bit code against floor(v*4096/3.3) within one code, clamped
// to 0..4095, and `valid` one clock after `en`.
module fxp_descaler_tb;
  import mpc_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  q88_t q88;
  code_t code;
  logic valid;
  int checks = 0, failures = 0;
  real v, ideal;
  int lo, hi;

  always #5 clk = ~clk;

  fxp_descaler dut (.clk, .rst, .en, .q88, .code, .valid);

  task automatic apply(input int w);
    @(posedge clk);
    en <= 1; q88 <= q88_t'(w);
    @(posedge clk);
    en <= 0;
    #1;
    v     = real'(w) / 256.0;
    ideal = v * 4096.0 / 3.3;
    lo = int'($floor(ideal)) - 1;
    hi = int'($floor(ideal));
    if (lo < 0) lo = 0;
    if (hi < 0) hi = 0;
    if (lo > 4095) lo = 4095;
    if (hi > 4095) hi = 4095;
    checks++;
    if (!valid || int'(code) < lo || int'(code) > hi) begin
      failures++;
      $display("FAIL: %f V -> %0d (exp %0d..%0d)", v, code, lo, hi);
    end
  endtask

  initial begin
    q88 = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int w = -512; w <= 1280; w++) apply(w);
    repeat (500) apply(int'($signed(16'($urandom))));
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
