// tb_fp_butterfly: self-checking testbench of the complex radix-2 butterfly.
//
// Two instances: single precision layout (latency 20) and the 15-bit fraction, 10-bit
// exponent format (latency 17), the format in which such a butterfly is evaluated in
// hardware. Random a, b and twiddle factors w (|w| of order one, as in an FFT) enter every
// cycle; x = a + w*b and y = a - w*b are compared with the same sequence of reference
// operations (four products, one difference, one sum, then the four outputs) computed with
// fp_ref_pkg, exactly at the expected latency.
module tb_fp_butterfly;
  import fp_ref_pkg::*;

  localparam int N  = 5000;
  localparam int L1 = 20;
  localparam int L2 = 17;

  typedef fp_ref #(23, 8)  r1_t;
  typedef fp_ref #(15, 10) r2_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] ar1, ai1, br1, bi1, wr1, wi1, xr1, xi1, yr1, yi1;
  logic [25:0] ar2, ai2, br2, bi2, wr2, wi2, xr2, xi2, yr2, yi2;

  fp_butterfly dut1 (.clk, .a_re(ar1), .a_im(ai1), .b_re(br1), .b_im(bi1), .w_re(wr1),
                     .w_im(wi1), .x_re(xr1), .x_im(xi1), .y_re(yr1), .y_im(yi1));
  fp_butterfly #(.MW(15), .EW(10)) dut2 (
    .clk, .a_re(ar2), .a_im(ai2), .b_re(br2), .b_im(bi2), .w_re(wr2), .w_im(wi2),
    .x_re(xr2), .x_im(xi2), .y_re(yr2), .y_im(yi2));

  logic [127:0] e1 [N];
  logic [103:0] e2 [N];
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref1(logic [31:0] ar, ai, br, bi, wr, wi);
    logic [31:0] tr, ti;
    tr = r1_t::add(r1_t::mul(br, wr), r1_t::mul(bi, wi), 1'b1);
    ti = r1_t::add(r1_t::mul(br, wi), r1_t::mul(bi, wr), 1'b0);
    return {r1_t::add(ar, tr, 1'b0), r1_t::add(ai, ti, 1'b0),
            r1_t::add(ar, tr, 1'b1), r1_t::add(ai, ti, 1'b1)};
  endfunction

  function automatic logic [103:0] ref2(logic [25:0] ar, ai, br, bi, wr, wi);
    logic [25:0] tr, ti;
    tr = r2_t::add(r2_t::mul(br, wr), r2_t::mul(bi, wi), 1'b1);
    ti = r2_t::add(r2_t::mul(br, wi), r2_t::mul(bi, wr), 1'b0);
    return {r2_t::add(ar, tr, 1'b0), r2_t::add(ai, ti, 1'b0),
            r2_t::add(ar, tr, 1'b1), r2_t::add(ai, ti, 1'b1)};
  endfunction

  initial begin : stimulus
    for (int i = 0; i < N + L1; i++) begin
      @(negedge clk);
      if (i >= L1) begin
        checks++;
        if ({xr1, xi1, yr1, yi1} !== e1[i-L1]) begin
          failures++;
          if (failures < 10) $display("FAIL sp #%0d got %h expected %h", i - L1, {xr1, xi1, yr1, yi1}, e1[i-L1]);
        end
      end
      if (i >= L2 && i - L2 < N) begin
        checks++;
        if ({xr2, xi2, yr2, yi2} !== e2[i-L2]) begin
          failures++;
          if (failures < 10) $display("FAIL 15/10 #%0d got %h expected %h", i - L2, {xr2, xi2, yr2, yi2}, e2[i-L2]);
        end
      end
      if (i < N) begin
        ar1 = r1_t::rnd(10); ai1 = r1_t::rnd(10); br1 = r1_t::rnd(10); bi1 = r1_t::rnd(10);
        wr1 = r1_t::rnd(1);  wi1 = r1_t::rnd(1);
        ar2 = r2_t::rnd(10); ai2 = r2_t::rnd(10); br2 = r2_t::rnd(10); bi2 = r2_t::rnd(10);
        wr2 = r2_t::rnd(1);  wi2 = r2_t::rnd(1);
        e1[i] = ref1(ar1, ai1, br1, bi1, wr1, wi1);
        e2[i] = ref2(ar2, ai2, br2, bi2, wr2, wi2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
