// mpc_pkg: number formats and helpers shared by the embedded MPC datapath.
//
// Every signal that crosses the controller boundary is a signed Q8.8 word
// (8 integer bits, 8 fraction bits), the format the scalers hand to the
// control algorithm. Problem data (observer gains, QP matrices) is held as
// signed Q5.12 words in 18 bits, the width of one FPGA multiplier input.
// The coefficient format is a choice of this design; the document fixes only
// the Q8.8 interface format.
package mpc_pkg;

  localparam int unsigned DATA_W    = 16;  // Q8.8 data word
  localparam int unsigned DATA_FRAC = 8;
  localparam int unsigned COEF_W    = 18;  // Q5.12 coefficient word
  localparam int unsigned COEF_FRAC = 12;
  localparam int unsigned ACC_W     = 48;  // multiply-accumulate register
  localparam int unsigned ADC_W     = 12;  // PMOD AD1 / DA2 resolution

  typedef logic signed [DATA_W-1:0] q88_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [ADC_W-1:0]         code_t;

  // Q8.8 value of 1.0, used for the constant column of affine maps.
  localparam q88_t Q88_ONE = q88_t'(1 << DATA_FRAC);

  // Saturate an accumulator that is already aligned to Q8.8 to 16 bits.
  function automatic q88_t sat_q88(input acc_t v);
    acc_t hi, lo;
    hi = acc_t'(32767);
    lo = -acc_t'(32768);
    if (v > hi)      return q88_t'(16'sh7fff);
    else if (v < lo) return q88_t'(-32768);
    else             return q88_t'(v);
  endfunction

  // Drop the coefficient fraction bits of an accumulator (floor) and saturate.
  function automatic q88_t acc_to_q88(input acc_t v);
    return sat_q88(v >>> COEF_FRAC);
  endfunction

  // Promote a Q8.8 word to accumulator alignment (Q8.8 times 2^COEF_FRAC).
  function automatic acc_t q88_to_acc(input q88_t v);
    return acc_t'(v) <<< COEF_FRAC;
  endfunction

endpackage
