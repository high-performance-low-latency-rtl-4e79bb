// fp_pkg: constants and helper functions shared by the floating point units.
//
// Number format (sign-magnitude, excess-coded exponent, implicit leading one):
//   {sign, exponent[EW-1:0], fraction[MW-1:0]},  value = (-1)^s * 1.f * 2^(e - (2^(EW-1)-1)).
// The default format is IEEE 754 single precision layout (MW=23, EW=8). An exponent field of
// zero means the value zero; denormals, NaN and infinity have no special meaning (the
// all-ones exponent is an ordinary exponent). Results are truncated, never rounded.
// The latency rules below follow the pipeline structure of the adder (7 stages) and of the
// multiplier (mantissa product plus one normalisation stage).
package fp_pkg;

  // Default format: 23-bit fraction, 8-bit exponent.
  localparam int unsigned FP_MW = 23;
  localparam int unsigned FP_EW = 8;

  // Adder pipeline: compare/select (2) + align (1) + add (1) + normalise (3).
  localparam int unsigned ADD_LATENCY = 7;

  // Add or subtract selector for the adder/subtractor.
  typedef enum logic {
    OP_ADD = 1'b0,
    OP_SUB = 1'b1
  } addsub_op_e;

  // Excess (bias) of an EW-bit exponent.
  function automatic int unsigned exp_bias(int unsigned ew);
    return (1 << (ew - 1)) - 1;
  endfunction

  // Latency of the unsigned mantissa multiplier for W-bit operands: one 18x18 signed
  // DSP-style product (17 unsigned bits) takes two register stages, a 35x35 product built
  // from four of them takes five.
  function automatic int unsigned mant_mult_latency(int unsigned w);
    return (w <= 17) ? 2 : 5;
  endfunction

  // Latency of the floating point multiplier: mantissa product plus normalisation stage.
  function automatic int unsigned mul_latency(int unsigned mw);
    return mant_mult_latency(mw + 1) + 1;
  endfunction

  // Number of four-bit find-first-one modules needed to cover the unnormalised adder
  // result (carry bit + implicit one + MW fraction bits).
  function automatic int unsigned norm_groups(int unsigned mw);
    return (mw + 2 + 3) / 4;
  endfunction

endpackage
