// fp_normalize: three-stage parallel normaliser of the floating point adder.
//
// Input: the (MW+2)-bit unnormalised sum (bit MW+1 is the carry of an addition, bit MW the
// implicit-one position), the larger exponent and the result sign. Output: the packed,
// normalised result {sign, exponent, fraction}, three cycles later.
//   Stage 1: the sum, padded with zeros to NG*4 bits, is fed to NG ff1_shift4 modules, the
//            k-th seeing it shifted left by 4k. Module k produces the normalised mantissa
//            that is right if the leading one lies in its four bits, an all-zero flag, and the
//            exponent correction 1 - (4k + shift). All candidates are registered.
//   Stage 2: a priority decoder picks the first module whose four bits were not all zero and
//            a multiplexer selects its mantissa and exponent correction; if all were zero the
//            result is zero. The exponent is delayed alongside.
//   Stage 3: the mantissa is only delayed; the exponent correction is added to the exponent.
// The three stages, the four-bit modules, the priority decoder, the multiplexer and the
// exponent adder follow the document's normaliser figure. That figure draws six modules
// (shifts 0, 4, ..., 20, a 6-to-1 multiplexer); this design derives NG from the sum width
// ((MW+2)/4 rounded up, 7 for MW=23) so that every bit of the 25-bit sum, carry included, is
// covered. Own choices: a result exponent below 1 gives zero (no denormals); one above the
// largest exponent field saturates to the largest representable magnitude; the sign of a
// zero result is cleared. The fraction is truncated, never rounded.
module fp_normalize
  import fp_pkg::*;
#(
  parameter int unsigned MW = FP_MW,
  parameter int unsigned EW = FP_EW
) (
  input  logic           clk,
  input  logic [MW+1:0]  u_i,      // unnormalised mantissa sum
  input  logic [EW-1:0]  e_i,      // exponent before correction
  input  logic           sign_i,
  output logic [EW+MW:0] result_o  // {sign, exponent, fraction}
);

  localparam int unsigned UW  = MW + 2;
  localparam int unsigned NG  = norm_groups(MW);
  localparam int unsigned PW  = 4 * NG;
  localparam int unsigned OW  = MW + 1;
  localparam int unsigned OFW = $clog2(PW) + 2;     // signed exponent correction width
  localparam int          EMAX = (1 << EW) - 1;

  logic [PW-1:0] up;
  always_comb up = PW'(u_i) << (PW - UW);

  // ---- Stage 1: parallel find-first-one modules -------------------------------------
  logic [OW-1:0]         cand_m   [NG];
  logic [1:0]            cand_sh  [NG];
  logic [NG-1:0]         cand_z;

  for (genvar k = 0; k < NG; k++) begin : g_ff1
    ff1_shift4 #(.PW(PW), .OW(OW)) u_ff1 (
      .x     (up << (4 * k)),
      .m     (cand_m[k]),
      .shift (cand_sh[k]),
      .zero4 (cand_z[k])
    );
  end

  logic [OW-1:0]         m_q1   [NG];
  logic signed [OFW-1:0] off_q1 [NG];
  logic [NG-1:0]         z_q1;
  logic [EW-1:0]         e_q1;
  logic                  s_q1;

  always_ff @(posedge clk) begin
    for (int k = 0; k < NG; k++) begin
      m_q1[k]   <= cand_m[k];
      off_q1[k] <= OFW'(signed'(1 - 4 * k - int'(cand_sh[k])));
    end
    z_q1 <= cand_z;
    e_q1 <= e_i;
    s_q1 <= sign_i;
  end

  // ---- Stage 2: priority decoder and NG-to-1 multiplexer ------------------------------
  logic [OW-1:0]         m_sel;     // bit OW-1 is the leading one (or zero for a zero result)
  logic signed [OFW-1:0] off_sel;
  logic                  all_zero;

  always_comb begin
    m_sel    = '0;
    off_sel  = '0;
    all_zero = 1'b1;
    for (int k = NG - 1; k >= 0; k--) begin
      if (!z_q1[k]) begin
        m_sel    = m_q1[k];
        off_sel  = off_q1[k];
        all_zero = 1'b0;
      end
    end
  end

  logic [MW-1:0]         m_q2;      // selected mantissa without its leading (implicit) one
  logic signed [OFW-1:0] off_q2;
  logic                  z_q2;
  logic [EW-1:0]         e_q2;
  logic                  s_q2;

  always_ff @(posedge clk) begin
    m_q2   <= m_sel[MW-1:0];
    off_q2 <= off_sel;
    z_q2   <= all_zero;
    e_q2   <= e_q1;
    s_q2   <= s_q1;
  end

  // ---- Stage 3: exponent correction, mantissa delayed ---------------------------------
  int ex;
  always_comb ex = int'(e_q2) + int'(off_q2);

  always_ff @(posedge clk) begin
    if (z_q2 || ex < 1)  result_o <= '0;
    else if (ex > EMAX)  result_o <= {s_q2, EW'(EMAX), {MW{1'b1}}};
    else                 result_o <= {s_q2, EW'(ex), m_q2};
  end

endmodule
