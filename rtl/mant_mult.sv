// mant_mult: pipelined unsigned multiplier for the floating point mantissas.
//
// p = a * b, full 2W-bit product. The multiplier is organised like a chain of 18x18 signed
// DSP slices, each of which multiplies 17-bit unsigned slices:
//   W <= 17: one slice; input registers, product register; latency 2.
//   17 < W <= 34: a 35x35 multiplier from four slices (the document uses this for the
//     24x24 single precision product, latency 5). With a = A1*2^17 + A0 and
//     b = B1*2^17 + B0:
//       stage 1  input registers
//       stage 2  the four partial products A0*B0, A1*B0, A0*B1, A1*B1
//       stage 3  (A0*B0 >> 17) + A1*B0, low 17 product bits fixed
//       stage 4  previous + A0*B1, next 17 product bits fixed
//       stage 5  (previous >> 17) + A1*B1, the top bits
//     which is the 17-bit shifted cascade used to build wide products from DSP slices.
// The document gives the slice count and the latency, and refers to the vendor's guide for
// the construction; the stage split above is this design's. Latency is
// fp_pkg::mant_mult_latency(W); no reset, one product per cycle.
module mant_mult #(
  parameter int unsigned W = 24
) (
  input  logic            clk,
  input  logic [W-1:0]    a,
  input  logic [W-1:0]    b,
  output logic [2*W-1:0]  p
);

  if (W > 34) begin : g_too_wide
    $error("mant_mult: operands wider than 34 bits are not supported");
  end

  if (W <= 17) begin : g_one
    logic [W-1:0] a_q, b_q;
    always_ff @(posedge clk) begin
      a_q <= a;
      b_q <= b;
      p   <= a_q * b_q;
    end
  end else begin : g_four
    logic [W-1:0]  a_q, b_q;
    logic [33:0]   p00, p10, p01, p11;     // stage 2 partial products
    logic [16:0]   lo_3, lo_4;             // product bits [16:0]
    logic [34:0]   t_3;                    // stage 3 cascade sum
    logic [33:0]   p01_3, p11_3, p11_4;
    logic [16:0]   mid_4;                  // product bits [33:17]
    logic [18:0]   t_4;                    // stage 4 cascade sum, bits above 33
    logic [35:0]   t4_full;
    logic [36:0]   hi_5;

    always_ff @(posedge clk) begin
      // stage 1
      a_q <= a;
      b_q <= b;
      // stage 2
      p00 <= 34'(a_q[16:0])     * 34'(b_q[16:0]);
      p10 <= 34'(a_q[W-1:17])   * 34'(b_q[16:0]);
      p01 <= 34'(a_q[16:0])     * 34'(b_q[W-1:17]);
      p11 <= 34'(a_q[W-1:17])   * 34'(b_q[W-1:17]);
      // stage 3
      t_3   <= 35'(p00[33:17]) + 35'(p10);
      lo_3  <= p00[16:0];
      p01_3 <= p01;
      p11_3 <= p11;
      // stage 4
      mid_4 <= t4_full[16:0];
      t_4   <= t4_full[35:17];
      lo_4  <= lo_3;
      p11_4 <= p11_3;
      // stage 5
      p     <= (2*W)'({hi_5, mid_4, lo_4});
    end

    always_comb begin
      t4_full = 36'(t_3) + 36'(p01_3);
      hi_5    = 37'(t_4) + 37'(p11_4);
    end
  end

endmodule
