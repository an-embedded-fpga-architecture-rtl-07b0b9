// fxp_scaler: converts a 12-bit PMOD AD1 code into a signed Q8.8 voltage.
//
// As the document describes, the code is zero-padded to 16 bits and scaled by a
// constant: read as raw Q8.8 the padded code would mean code/256 V, while the
// converter spans 0..3.3 V over 4096 codes, so the code is multiplied by
// SCALE/2^SHIFT = 3.3*256/4096 (13517/65536) and the fraction bits below Q8.8
// are dropped. The constant and its width are this design's choice.
// Timing: the result is registered; `valid` pulses one clock after `en`, and
// `q88` holds its value until the next `en`.
module fxp_scaler
  import mpc_pkg::*;
#(
  parameter int unsigned SCALE = 13517,  // round(3.3/4096*256*2^SHIFT)
  parameter int unsigned SHIFT = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  code_t sample,
  output q88_t  q88,
  output logic  valid
);

  logic [15:0] padded;
  logic [47:0] product;

  always_comb begin
    padded  = {4'b0000, sample};
    product = 48'(padded) * 48'(SCALE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q88   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) q88 <= q88_t'(product >> SHIFT);
    end
  end

endmodule
