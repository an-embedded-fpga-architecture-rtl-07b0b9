// fxp_scaler_tb: applies all 4096 ADC codes to the scaler and checks each
// Q8.8 result against the real voltage code*3.3/4096 (error below one Q8.8
// step) and `valid` one clock after `en`.
module fxp_scaler_tb;
  import mpc_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  code_t sample;
  q88_t q88;
  logic valid;
  int checks = 0, failures = 0;
  real v, got;

  always #5 clk = ~clk;

  fxp_scaler dut (.clk, .rst, .en, .sample, .q88, .valid);

  initial begin
    sample = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 4096; c++) begin
      @(posedge clk);
      en <= 1; sample <= code_t'(c);
      @(posedge clk);
      en <= 0;
      #1;
      checks++;
      v   = c * 3.3 / 4096.0;
      got = real'(q88) / 256.0;
      if (!valid || got > v + 1.0/256.0 || got < v - 1.0/256.0) begin
        failures++;
        $display("FAIL: code %0d -> %f (exp %f) valid=%b", c, got, v, valid);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (valid) begin failures++; $display("FAIL: valid stuck"); end
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
