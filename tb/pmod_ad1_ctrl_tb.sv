// pmod_ad1_ctrl_tb: runs the PMOD AD1 controller against two AD7476A models.
// Each frame the models are given fresh random codes; every `done` pulse must
// deliver exactly the codes the models sampled at the start of that frame.
// Consecutive frames must start SAMPLE_DIV clocks apart (95.1 kHz), and the
// serial clock must never exceed one edge per SCLK_HALF clocks. Dropping `en`
// must stop the frames.
module pmod_ad1_ctrl_tb;
  import mpc_pkg::*;

  localparam int SAMPLE_DIV = 1052;
  localparam int FRAMES     = 20;

  logic clk = 0, rst = 1, en = 0;
  logic cs_n, sclk;
  logic [1:0] sdata;
  code_t sample [2];
  logic done;
  logic [11:0] code [2];
  logic [11:0] exp_code [2];
  int frames [2];
  int checks = 0, failures = 0;
  longint cyc = 0, last_start = -1;
  int nframes = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pmod_ad1_ctrl #(.SAMPLE_DIV(SAMPLE_DIV)) dut (
    .clk, .rst, .en, .cs_n, .sclk, .sdata, .sample, .done
  );

  ad7476a_model adc0 (.cs_n, .sclk, .code(code[0]), .sdata(sdata[0]), .frames(frames[0]));
  ad7476a_model adc1 (.cs_n, .sclk, .code(code[1]), .sdata(sdata[1]), .frames(frames[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // new codes for every frame; remember what the models latched
  always @(negedge cs_n) begin
    exp_code[0] = code[0];
    exp_code[1] = code[1];
    if (last_start >= 0) check(cyc - last_start == SAMPLE_DIV, $sformatf("frame spacing %0d", cyc - last_start));
    last_start = cyc;
  end
  always @(posedge cs_n) begin
    code[0] = 12'($urandom);
    code[1] = 12'($urandom);
  end

  always @(posedge clk) begin
    if (done && !rst) begin
      nframes++;
      check(sample[0] == exp_code[0], $sformatf("frame %0d ch0 got %h exp %h", nframes, sample[0], exp_code[0]));
      check(sample[1] == exp_code[1], $sformatf("ch1 got %h exp %h", sample[1], exp_code[1]));
    end
  end

  initial begin
    code[0] = 12'hfff; code[1] = 12'h001;
    repeat (3) @(posedge clk);
    rst <= 0;
    en  <= 1;
    wait (nframes == FRAMES);
    @(posedge clk);
    en <= 0;
    repeat (3 * SAMPLE_DIV) @(posedge clk);
    check(nframes == FRAMES, "frames after en dropped");
    check(frames[0] == FRAMES && frames[1] == FRAMES, $sformatf("model frame count %0d %0d", frames[0], frames[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((FRAMES + 10) * SAMPLE_DIV) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
