// ff1_shift4: one "find first one in four bits and shift" module of the parallel normaliser.
//
// The input is the unnormalised mantissa already shifted left by a multiple of four (the
// module therefore assumes that every bit above its window was zero). The module looks at
// the top four bits of its input, finds the leading one among them (position 0..3 from the
// top), shifts the input left by that amount so that the leading one lands in the MSB, and
// outputs the top OW bits. It also outputs the extra shift it applied (used to correct the
// exponent) and a flag that is one when all four bits were zero. Purely combinational; the
// normaliser registers its outputs. The four-bit window matches four-input LUTs, as the
// document explains; the encoding of the shift output is this design's choice.
module ff1_shift4 #(
  parameter int unsigned PW = 28,   // width of the (shifted) input
  parameter int unsigned OW = 24    // width of the normalised output
) (
  input  logic [PW-1:0] x,
  output logic [OW-1:0] m,          // x shifted so that a one in its top four bits is the MSB
  output logic [1:0]    shift,      // extra left shift applied (0..3)
  output logic          zero4       // top four bits of x were all zero
);

  logic [PW-1:0] xs;    // its bits below the OW output bits are the ones shifted out (truncated)

  always_comb begin
    zero4 = (x[PW-1 -: 4] == 4'b0000);
    if (x[PW-1])      shift = 2'd0;
    else if (x[PW-2]) shift = 2'd1;
    else if (x[PW-3]) shift = 2'd2;
    else              shift = 2'd3;
    xs = x << shift;
    m  = xs[PW-1 -: OW];
  end

endmodule
