// fp_butterfly_top: top level of the design, a complex radix-2 floating point butterfly with
// I/O register stages and a valid signal.
//
// The butterfly (fp_butterfly, four multipliers and six adder/subtractors) sits between
// IN_REGS register stages on its inputs and OUT_REGS on its outputs, so that pad delays do
// not limit the clock in an FPGA (the document inserts two stages before and one after its
// units for the same reason). A valid bit travels alongside the data; it is this design's
// addition, so that a user need not count cycles. It is the only register with a reset
// (synchronous, active high). Latency from in_valid to out_valid:
// IN_REGS + fp_pkg::mul_latency(MW) + 2*ADD_LATENCY + OUT_REGS = 23 cycles for the default
// single precision layout. One butterfly may be started every cycle.
module fp_butterfly_top
  import fp_pkg::*;
#(
  parameter int unsigned MW       = FP_MW,
  parameter int unsigned EW       = FP_EW,
  parameter int unsigned IN_REGS  = 2,
  parameter int unsigned OUT_REGS = 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [EW+MW:0] a_re, a_im, b_re, b_im, w_re, w_im,
  output logic           out_valid,
  output logic [EW+MW:0] x_re, x_im, y_re, y_im
);

  localparam int unsigned LB  = mul_latency(MW) + 2 * ADD_LATENCY;
  localparam int unsigned LAT = IN_REGS + LB + OUT_REGS;
  localparam int unsigned FW  = EW + MW + 1;

  // Input register stages: {a_re, a_im, b_re, b_im, w_re, w_im}
  logic [6*FW-1:0] in_pipe [IN_REGS+1];
  assign in_pipe[0] = {a_re, a_im, b_re, b_im, w_re, w_im};
  always_ff @(posedge clk) begin
    for (int i = 1; i <= IN_REGS; i++) in_pipe[i] <= in_pipe[i-1];
  end

  logic [FW-1:0] bf_a_re, bf_a_im, bf_b_re, bf_b_im, bf_w_re, bf_w_im;
  assign {bf_a_re, bf_a_im, bf_b_re, bf_b_im, bf_w_re, bf_w_im} = in_pipe[IN_REGS];

  logic [FW-1:0] bf_x_re, bf_x_im, bf_y_re, bf_y_im;

  fp_butterfly #(.MW(MW), .EW(EW)) u_bfly (
    .clk,
    .a_re(bf_a_re), .a_im(bf_a_im), .b_re(bf_b_re), .b_im(bf_b_im),
    .w_re(bf_w_re), .w_im(bf_w_im),
    .x_re(bf_x_re), .x_im(bf_x_im), .y_re(bf_y_re), .y_im(bf_y_im)
  );

  // Output register stages: {x_re, x_im, y_re, y_im}
  logic [4*FW-1:0] out_pipe [OUT_REGS+1];
  assign out_pipe[0] = {bf_x_re, bf_x_im, bf_y_re, bf_y_im};
  always_ff @(posedge clk) begin
    for (int i = 1; i <= OUT_REGS; i++) out_pipe[i] <= out_pipe[i-1];
  end
  assign {x_re, x_im, y_re, y_im} = out_pipe[OUT_REGS];

  // Valid pipeline
  logic [LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

endmodule
