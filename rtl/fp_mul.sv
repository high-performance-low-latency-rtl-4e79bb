// fp_mul: pipelined floating point multiplier, one operation per cycle.
//
// result = a * b on {sign, exponent, fraction} numbers (IEEE 754 single precision layout by
// default). As in the document: the mantissas (implicit one included) are multiplied in
// mant_mult, the exponents are added, the sign is the exclusive-or of the input signs, and a
// final stage normalises the product, whose leading one can only be in one of the two top
// bit positions for normalised inputs, adjusting the exponent by one in a second adder.
// Latency: mant_mult latency + 1, i.e. 6 cycles for MW=23 (four-slice 35x35 product, 5
// cycles) and 3 cycles for MW=15 (a 16x16 product fits one slice, 2 cycles).
// The exponent sum (ea + eb - bias) is formed in the first cycle and delayed alongside the
// product. Own choices: an input with exponent field zero is zero and gives a zero result;
// an exponent below 1 after normalisation gives zero; one above the largest exponent field
// saturates to the largest magnitude; the product is truncated to MW fraction bits.
module fp_mul
  import fp_pkg::*;
#(
  parameter int unsigned MW = FP_MW,
  parameter int unsigned EW = FP_EW
) (
  input  logic           clk,
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] result
);

  localparam int unsigned LM   = mant_mult_latency(MW + 1);
  localparam int          BIAS = int'(exp_bias(EW));
  localparam int          EMAX = (1 << EW) - 1;
  localparam int unsigned XW   = EW + 2;              // signed exponent sum width

  logic [EW-1:0] ea, eb;
  logic [MW:0]   ma, mb;
  logic          zero_in;

  always_comb begin
    ea      = a[EW+MW-1:MW];
    eb      = b[EW+MW-1:MW];
    zero_in = (ea == '0) || (eb == '0);
    ma      = {1'b1, a[MW-1:0]};
    mb      = {1'b1, b[MW-1:0]};
  end

  // Mantissa product
  logic [2*MW+1:0] prod;
  mant_mult #(.W(MW + 1)) u_mant (.clk, .a(ma), .b(mb), .p(prod));

  // Exponent adder, sign and zero flag, delayed to match the mantissa product
  logic signed [XW-1:0] esum_d [LM];
  logic [LM-1:0]        sign_d, zero_d;

  always_ff @(posedge clk) begin
    esum_d[0] <= XW'(signed'({2'b00, ea})) + XW'(signed'({2'b00, eb})) - XW'(BIAS);
    sign_d[0] <= a[EW+MW] ^ b[EW+MW];
    zero_d[0] <= zero_in;
    for (int i = 1; i < LM; i++) begin
      esum_d[i] <= esum_d[i-1];
      sign_d[i] <= sign_d[i-1];
      zero_d[i] <= zero_d[i-1];
    end
  end

  // Normalisation: the leading one is in bit 2MW+1 or bit 2MW.
  logic signed [XW-1:0] e_norm;
  logic [MW-1:0]        f_norm;

  always_comb begin
    if (prod[2*MW+1]) begin
      e_norm = esum_d[LM-1] + XW'(1);
      f_norm = prod[2*MW -: MW];
    end else begin
      e_norm = esum_d[LM-1];
      f_norm = prod[2*MW-1 -: MW];
    end
  end

  always_ff @(posedge clk) begin
    if (zero_d[LM-1] || e_norm < XW'(1))  result <= '0;
    else if (e_norm > XW'(EMAX))          result <= {sign_d[LM-1], EW'(EMAX), {MW{1'b1}}};
    else                                  result <= {sign_d[LM-1], e_norm[EW-1:0], f_norm};
  end

endmodule
