// fp_add_addsub: mantissa adder/subtractor step of the floating point adder (1 stage).
//
// Computes A + B or A - B on the (MW+1)-bit mantissas, A being the larger operand and B the
// aligned smaller one, and registers an (MW+2)-bit result whose top bit is the carry of an
// addition. Each bit is one cell as in the document's combined adder/subtractor figure: a
// single function of Sub, Set-to-zero, B and A forms the propagate signal
//   p = A xor (Sub xor (B and not Set-to-zero)),
// a carry multiplexer selected by p passes either the carry in or A, and the sum is
// p xor carry-in. The chain's carry in is Sub, so a subtraction is A + not(B) + 1. The
// set_zero input is the alignment step's flag (mark "1" in the adder figure) that clears B
// when the exponent difference exceeds the shifter's range. The compare/select step makes
// B <= A, so a subtraction never goes negative and the carry out of a subtraction is
// always one; it is not part of the result.
// Latency 1 cycle; exponent and sign pass through the same register stage.
module fp_add_addsub
  import fp_pkg::*;
#(
  parameter int unsigned MW = FP_MW,
  parameter int unsigned EW = FP_EW
) (
  input  logic          clk,
  input  logic [EW-1:0] e_i,
  input  logic [MW:0]   a_i,        // larger mantissa
  input  logic [MW:0]   b_i,        // aligned smaller mantissa
  input  logic          set_zero_i, // take b as zero
  input  logic          sub_i,      // 1: a - b, 0: a + b
  input  logic          sign_i,
  output logic [EW-1:0] e_o,
  output logic [MW+1:0] sum_o,      // unnormalised result, bit MW+1 is the carry of an add
  output logic          sign_o
);

  logic [MW:0]   p;       // per-bit propagate (the LUT output of each cell)
  logic [MW:0]   s;
  logic          cout;    // carry out of the top bit cell

  always_comb begin
    logic cy;             // carry into the current bit cell
    cy = sub_i;
    for (int i = 0; i <= MW; i++) begin
      p[i] = a_i[i] ^ (sub_i ^ (b_i[i] & ~set_zero_i));
      s[i] = p[i] ^ cy;
      cy   = p[i] ? cy : a_i[i];
    end
    cout = cy;
  end

  always_ff @(posedge clk) begin
    e_o    <= e_i;
    sum_o  <= {cout & ~sub_i, s};
    sign_o <= sign_i;
  end

endmodule
