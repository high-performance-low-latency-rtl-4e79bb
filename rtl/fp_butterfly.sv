// fp_butterfly: complex radix-2 (decimation in time) butterfly built from the floating point
// multipliers and adders.
//
//   t = w * b            (four fp_mul, then one fp_add subtract and one fp_add add)
//   x = a + t,  y = a - t (four fp_add)
// t_re = b_re*w_re - b_im*w_im and t_im = b_re*w_im + b_im*w_re. The a input is delayed
// by the multiplier and first adder latencies so that it meets t. Fully pipelined: one
// butterfly per cycle, latency fp_pkg::mul_latency(MW) + 2*ADD_LATENCY (20 cycles for
// MW=23, 17 for MW=15). The document uses such a butterfly as the test vehicle for its
// adder and multiplier but does not draw it; the arrangement above (the usual textbook
// butterfly, with separate units for every operation) is this design's choice.
module fp_butterfly
  import fp_pkg::*;
#(
  parameter int unsigned MW = FP_MW,
  parameter int unsigned EW = FP_EW
) (
  input  logic           clk,
  input  logic [EW+MW:0] a_re, a_im,
  input  logic [EW+MW:0] b_re, b_im,
  input  logic [EW+MW:0] w_re, w_im,     // twiddle factor
  output logic [EW+MW:0] x_re, x_im,     // a + w*b
  output logic [EW+MW:0] y_re, y_im      // a - w*b
);

  localparam int unsigned LM   = mul_latency(MW);
  localparam int unsigned LDLY = LM + ADD_LATENCY;   // delay of a to meet w*b

  logic [EW+MW:0] p_rr, p_ii, p_ri, p_ir;   // b_re*w_re, b_im*w_im, b_re*w_im, b_im*w_re
  logic [EW+MW:0] t_re, t_im;

  fp_mul #(.MW(MW), .EW(EW)) u_mul_rr (.clk, .a(b_re), .b(w_re), .result(p_rr));
  fp_mul #(.MW(MW), .EW(EW)) u_mul_ii (.clk, .a(b_im), .b(w_im), .result(p_ii));
  fp_mul #(.MW(MW), .EW(EW)) u_mul_ri (.clk, .a(b_re), .b(w_im), .result(p_ri));
  fp_mul #(.MW(MW), .EW(EW)) u_mul_ir (.clk, .a(b_im), .b(w_re), .result(p_ir));

  fp_add #(.MW(MW), .EW(EW)) u_add_tre (.clk, .a(p_rr), .b(p_ii), .op(OP_SUB), .result(t_re));
  fp_add #(.MW(MW), .EW(EW)) u_add_tim (.clk, .a(p_ri), .b(p_ir), .op(OP_ADD), .result(t_im));

  // Delay line for a
  logic [EW+MW:0] are_d [LDLY];
  logic [EW+MW:0] aim_d [LDLY];

  always_ff @(posedge clk) begin
    are_d[0] <= a_re;
    aim_d[0] <= a_im;
    for (int i = 1; i < LDLY; i++) begin
      are_d[i] <= are_d[i-1];
      aim_d[i] <= aim_d[i-1];
    end
  end

  fp_add #(.MW(MW), .EW(EW)) u_add_xre (.clk, .a(are_d[LDLY-1]), .b(t_re), .op(OP_ADD), .result(x_re));
  fp_add #(.MW(MW), .EW(EW)) u_add_xim (.clk, .a(aim_d[LDLY-1]), .b(t_im), .op(OP_ADD), .result(x_im));
  fp_add #(.MW(MW), .EW(EW)) u_add_yre (.clk, .a(are_d[LDLY-1]), .b(t_re), .op(OP_SUB), .result(y_re));
  fp_add #(.MW(MW), .EW(EW)) u_add_yim (.clk, .a(aim_d[LDLY-1]), .b(t_im), .op(OP_SUB), .result(y_im));

endmodule
