// fp_add: pipelined floating point adder/subtractor, latency 7, one operation per cycle.
//
// result = a + b (op = OP_ADD) or a - b (op = OP_SUB) on {sign, exponent, fraction} numbers
// with an implicit one and an excess-coded exponent (IEEE 754 single precision layout by
// default). Four steps, as in the document's adder architecture:
//   compare/select (2 stages, fp_add_cmpsel): swap so the smaller operand is aligned,
//   align (1 stage, fp_add_align): shift it right by the exponent difference,
//   add (1 stage, fp_add_addsub): add or subtract the mantissas with carry-chain bit cells,
//   normalise (3 stages, fp_normalize): parallel leading-one search and exponent correction.
// No rounding (the result is truncated), no denormals (an exponent field of zero is zero),
// no NaN or infinity. Underflow gives zero and overflow saturates, which is this design's
// choice. The datapath has no reset; the result for an input appears exactly 7 clock edges
// after it is applied.
module fp_add
  import fp_pkg::*;
#(
  parameter int unsigned MW = FP_MW,
  parameter int unsigned EW = FP_EW
) (
  input  logic           clk,
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  input  addsub_op_e     op,
  output logic [EW+MW:0] result
);

  logic [EW-1:0] cs_e, cs_diff, al_e, ad_e;
  logic [MW:0]   cs_mbig, cs_msmall, al_mbig, al_mshift;
  logic          cs_sign, cs_sub, al_zero, al_sign, al_sub, ad_sign;
  logic [MW+1:0] ad_sum;

  fp_add_cmpsel #(.MW(MW), .EW(EW)) u_cmpsel (
    .clk, .a, .b, .op,
    .e_big(cs_e), .diff(cs_diff), .m_big(cs_mbig), .m_small(cs_msmall),
    .sign(cs_sign), .sub(cs_sub)
  );

  fp_add_align #(.MW(MW), .EW(EW)) u_align (
    .clk,
    .e_big_i(cs_e), .diff_i(cs_diff), .m_big_i(cs_mbig), .m_small_i(cs_msmall),
    .sign_i(cs_sign), .sub_i(cs_sub),
    .e_big_o(al_e), .m_big_o(al_mbig), .m_shift_o(al_mshift), .set_zero_o(al_zero),
    .sign_o(al_sign), .sub_o(al_sub)
  );

  fp_add_addsub #(.MW(MW), .EW(EW)) u_addsub (
    .clk,
    .e_i(al_e), .a_i(al_mbig), .b_i(al_mshift), .set_zero_i(al_zero), .sub_i(al_sub),
    .sign_i(al_sign),
    .e_o(ad_e), .sum_o(ad_sum), .sign_o(ad_sign)
  );

  fp_normalize #(.MW(MW), .EW(EW)) u_norm (
    .clk, .u_i(ad_sum), .e_i(ad_e), .sign_i(ad_sign), .result_o(result)
  );

endmodule
