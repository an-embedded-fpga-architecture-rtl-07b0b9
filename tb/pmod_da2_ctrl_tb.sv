// pmod_da2_ctrl_tb: sends random code pairs through the PMOD DA2 controller
// into two DAC121S101 models and checks the codes the models latch, the
// power-down bits (normal mode), that every frame has exactly 16 bits, that
// `done` comes 1 + 32*SCLK_HALF clocks after `dac_enable`, and that an enable
// during a frame is ignored.
module pmod_da2_ctrl_tb;
  import mpc_pkg::*;
  localparam int SCLK_HALF = 2;
  logic clk = 0, rst = 1, dac_enable = 0;
  code_t code [2];
  logic sync_n, sclk, busy, done;
  logic [1:0] din;
  logic [11:0] vout [2];
  logic [1:0] pd [2];
  int frames [2], bad [2];
  int checks = 0, failures = 0;
  longint t0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pmod_da2_ctrl #(.SCLK_HALF(SCLK_HALF)) dut (
    .clk, .rst, .dac_enable, .code, .sync_n, .sclk, .din, .busy, .done
  );
  dac121s101_model d0 (.sync_n, .sclk, .din(din[0]), .vout(vout[0]), .pd(pd[0]), .frames(frames[0]), .bad_frames(bad[0]));
  dac121s101_model d1 (.sync_n, .sclk, .din(din[1]), .vout(vout[1]), .pd(pd[1]), .frames(frames[1]), .bad_frames(bad[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [11:0] c0, c1;
    code[0] = '0; code[1] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 40; n++) begin
      c0 = (n == 0) ? 12'hfff : 12'($urandom);
      c1 = (n == 0) ? 12'h000 : 12'($urandom);
      @(posedge clk);
      dac_enable <= 1; code[0] <= c0; code[1] <= c1;
      t0 = cyc;
      @(posedge clk);
      dac_enable <= 0;
      code[0] <= ~c0; code[1] <= ~c1;   // must already be latched
      repeat (5) @(posedge clk);
      dac_enable <= 1;                    // ignored while busy
      @(posedge clk);
      dac_enable <= 0;
      while (!done) @(posedge clk);
      check(cyc - t0 == 1 + 32*SCLK_HALF + 1, $sformatf("frame length %0d", cyc - t0));
      #1;
      check(vout[0] == c0 && vout[1] == c1, $sformatf("codes %h %h exp %h %h", vout[0], vout[1], c0, c1));
      check(pd[0] == 2'b00 && pd[1] == 2'b00, "power-down bits");
      check(frames[0] == n + 1 && frames[1] == n + 1, "frame count");
      repeat ($urandom_range(3, 0)) @(posedge clk);
    end
    check(bad[0] == 0 && bad[1] == 0, "frames with a wrong bit count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
