// fxp_descaler: converts a signed Q8.8 control voltage into a 12-bit PMOD DA2
// code.
//
// This is the inverse of fxp_scaler: the Q8.8 word is multiplied by
// SCALE/2^SHIFT = 4096/(3.3*256) (19859/4096), the fraction is dropped, and
// the code is clamped to 0..4095 so that a negative move gives 0 V and a move
// above 3.3 V gives full scale. The document gives only the function; the
// constant and the clamping are this design's choice.
// Timing: registered; `valid` pulses one clock after `en`.
module fxp_descaler
  import mpc_pkg::*;
#(
  parameter int unsigned SCALE = 19859,  // round(4096/(3.3*256)*2^SHIFT)
  parameter int unsigned SHIFT = 12
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  q88_t  q88,
  output code_t code,
  output logic  valid
);

  logic signed [47:0] product;
  logic signed [47:0] scaled;
  code_t              clamped;

  always_comb begin
    product = 48'(q88) * $signed(48'(SCALE));
    scaled  = product >>> SHIFT;
    if (scaled < 0)                           clamped = '0;
    else if (scaled > 48'sd4095)              clamped = code_t'(4095);
    else                                      clamped = code_t'(scaled);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) code <= clamped;
    end
  end

endmodule
