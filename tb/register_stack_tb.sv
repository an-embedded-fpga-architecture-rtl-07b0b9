// register_stack_tb: loads random estimates and control moves through the two
// save strobes, in random order and overlap, and checks that the stack always
// returns the newest saved value of each and holds it otherwise.
module register_stack_tb;
  import mpc_pkg::*;
  localparam int NX = 4, NU = 2, NY = 2;
  logic clk = 0, rst = 1, save_state = 0, save_u = 0;
  q88_t s_new [NX+NY], s_q [NX+NY], u_new [NU], u_q [NU];
  q88_t s_ref [NX+NY], u_ref [NU];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  register_stack #(.NX(NX), .NU(NU), .NY(NY)) dut (.*);

  initial begin
    foreach (s_ref[i]) s_ref[i] = '0;
    foreach (u_ref[i]) u_ref[i] = '0;
    foreach (s_new[i]) s_new[i] = '0;
    foreach (u_new[i]) u_new[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk);
      #1;
      checks++;
      if (s_q != s_ref || u_q != u_ref) begin failures++; $display("FAIL at step %0d", n); end
      save_state = $urandom_range(1, 0);
      save_u     = $urandom_range(1, 0);
      foreach (s_new[i]) s_new[i] = q88_t'($urandom);
      foreach (u_new[i]) u_new[i] = q88_t'($urandom);
      if (save_state) s_ref = s_new;
      if (save_u)     u_ref = u_new;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
