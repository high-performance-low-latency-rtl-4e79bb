// fp_add_cmpsel: compare/select step of the floating point adder/subtractor (2 stages).
//
// Stage 1 registers the two exponents, both exponent differences (ea-eb and eb-ea, each with
// a borrow bit), the result of a mantissa magnitude compare, and both mantissas with the
// implicit one inserted for non-zero operands. Between stage 1 and stage 2 a small decision
// block (CMP) decides from the borrow, the zero test of the difference and the mantissa
// compare which operand is smaller; stage 2 registers the outputs of the swap multiplexers:
// the larger exponent, the non-negative exponent difference, the larger mantissa (direct
// path) and the smaller mantissa (alignment path), together with the result sign and whether
// the mantissas are to be subtracted.
//
// The structure (two subtractors, a "<" comparator, CMP, four multiplexers, two register
// rows) follows the adder architecture figure. Own choices: an exponent field of zero is the
// value zero and its whole mantissa is cleared (denormals are flushed); op=OP_SUB flips the
// sign of b before the comparison; the result sign is the sign of the larger operand.
// Latency 2 cycles, one new operand pair per cycle. No reset: the datapath only holds data.
module fp_add_cmpsel
  import fp_pkg::*;
#(
  parameter int unsigned MW = FP_MW,   // fraction bits
  parameter int unsigned EW = FP_EW    // exponent bits
) (
  input  logic              clk,
  input  logic [EW+MW:0]    a,         // {sign, exponent, fraction}
  input  logic [EW+MW:0]    b,
  input  addsub_op_e        op,        // OP_ADD: a+b, OP_SUB: a-b
  output logic [EW-1:0]     e_big,     // exponent of the larger operand
  output logic [EW-1:0]     diff,      // |ea - eb|
  output logic [MW:0]       m_big,     // mantissa of the larger operand, implicit one included
  output logic [MW:0]       m_small,   // mantissa of the smaller operand, to be aligned
  output logic              sign,      // sign of the result
  output logic              sub        // 1: subtract mantissas, 0: add them
);

  // Stage 1 registers
  logic [EW-1:0] ea_q, eb_q;
  logic [EW:0]   dab_q;              // ea-eb with borrow in the top bit
  logic [EW-1:0] dba_q;              // eb-ea, only used when ea-eb borrows
  logic          mlt_q;              // mantissa of a < mantissa of b
  logic [MW:0]   ma_q, mb_q;
  logic          sa_q, sb_q;

  logic [EW-1:0] ea, eb;
  logic [MW:0]   ma, mb;

  always_comb begin
    ea = a[EW+MW-1:MW];
    eb = b[EW+MW-1:MW];
    ma = (ea != '0) ? {1'b1, a[MW-1:0]} : '0;
    mb = (eb != '0) ? {1'b1, b[MW-1:0]} : '0;
  end

  always_ff @(posedge clk) begin
    ea_q  <= ea;
    eb_q  <= eb;
    dab_q <= {1'b0, ea} - {1'b0, eb};
    dba_q <= eb - ea;
    mlt_q <= ma < mb;
    ma_q  <= ma;
    mb_q  <= mb;
    sa_q  <= a[EW+MW];
    sb_q  <= b[EW+MW] ^ (op == OP_SUB);
  end

  // CMP: a is the smaller operand when its exponent is smaller, or the exponents are equal
  // and its mantissa is smaller.
  logic a_small;
  always_comb a_small = dab_q[EW] | ((dab_q == '0) & mlt_q);

  // Stage 2: swap multiplexers
  always_ff @(posedge clk) begin
    e_big   <= a_small ? eb_q : ea_q;
    diff    <= a_small ? dba_q : dab_q[EW-1:0];
    m_big   <= a_small ? mb_q : ma_q;
    m_small <= a_small ? ma_q : mb_q;
    sign    <= a_small ? sb_q : sa_q;
    sub     <= sa_q ^ sb_q;
  end

endmodule
