// fp_add_align: alignment step of the floating point adder/subtractor (1 stage).
//
// Shifts the mantissa of the smaller operand right by the exponent difference so that both
// operands share the larger exponent. The barrel shifter only looks at the SHW low bits of
// the difference (SHW = ceil(log2(MW+1)), 5 bits for the 24-bit single precision mantissa);
// if any higher difference bit is one the operand has been shifted out completely, and a
// registered set_zero flag tells the following adder to treat it as zero. This keeps the
// shifter small, as the document describes; the shifter, the flag and their registers follow
// the adder architecture figure (the mark "2" on the shift amount). Bits shifted out are
// dropped (truncation). The larger exponent, the larger mantissa, the sign and the
// add/subtract flag travel through the same register stage. Latency 1 cycle.
module fp_add_align
  import fp_pkg::*;
#(
  parameter int unsigned MW = FP_MW,
  parameter int unsigned EW = FP_EW
) (
  input  logic          clk,
  input  logic [EW-1:0] e_big_i,
  input  logic [EW-1:0] diff_i,
  input  logic [MW:0]   m_big_i,
  input  logic [MW:0]   m_small_i,
  input  logic          sign_i,
  input  logic          sub_i,
  output logic [EW-1:0] e_big_o,
  output logic [MW:0]   m_big_o,
  output logic [MW:0]   m_shift_o,   // aligned smaller mantissa (before the zero override)
  output logic          set_zero_o,  // aligned mantissa is to be taken as zero
  output logic          sign_o,
  output logic          sub_o
);

  localparam int unsigned SHW = $clog2(MW + 1);

  logic high_bits;
  generate
    if (EW > SHW) begin : g_high
      assign high_bits = |diff_i[EW-1:SHW];
    end else begin : g_nohigh
      assign high_bits = 1'b0;
    end
  endgenerate

  always_ff @(posedge clk) begin
    e_big_o    <= e_big_i;
    m_big_o    <= m_big_i;
    m_shift_o  <= m_small_i >> diff_i[SHW-1:0];
    set_zero_o <= high_bits;
    sign_o     <= sign_i;
    sub_o      <= sub_i;
  end

endmodule
