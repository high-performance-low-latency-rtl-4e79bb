// tb_fp_butterfly_top: end-to-end testbench of the butterfly top level at its default
// parameters (single precision layout, two input and one output register stage).
//
// After a synchronous reset, butterflies are started on random cycles (about three in
// four). Each started butterfly's expected outputs, from fp_ref_pkg, and its start cycle
// are queued; every out_valid pops one entry and the outputs and the latency (23 cycles)
// are checked, as is the number of results. Operand mixes are chosen so that every
// mechanism of the adders and multipliers happens; the testbench counts, inside the design,
// how often each one did and fails if one never did: operand swap in compare/select,
// set-to-zero of an operand shifted out of range, effective subtraction, carry out of the
// mantissa adder, leading-one search beyond the first four-bit module (cancellation), zero
// result, overflow saturation or underflow, and both multiplier normalisation cases.
module tb_fp_butterfly_top;
  import fp_ref_pkg::*;

  localparam int N   = 4000;
  localparam int LAT = 23;

  typedef fp_ref #(23, 8) r_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, in_valid, out_valid;
  logic [31:0] a_re, a_im, b_re, b_im, w_re, w_im, x_re, x_im, y_re, y_im;

  fp_butterfly_top dut (.clk, .rst, .in_valid, .a_re, .a_im, .b_re, .b_im, .w_re, .w_im,
                        .out_valid, .x_re, .x_im, .y_re, .y_im);

  logic [127:0] exp_q [$];
  int           t_q   [$];
  int checks = 0, failures = 0, cycle = 0, started = 0, done = 0;
  bit counting = 1'b0;

  // Mechanism counters
  int n_swap = 0, n_setzero = 0, n_sub = 0, n_carry = 0, n_cancel = 0, n_zero = 0;
  int n_sat = 0, n_mul_hi = 0, n_mul_lo = 0;

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  `define TB_COUNT_ADD(U) \
    if (dut.u_bfly.U.u_cmpsel.a_small) n_swap++; \
    if (dut.u_bfly.U.u_align.set_zero_o) n_setzero++; \
    if (dut.u_bfly.U.u_align.sub_o) n_sub++; \
    if (dut.u_bfly.U.u_addsub.sum_o[24]) n_carry++; \
    if (!dut.u_bfly.U.u_norm.z_q2 && dut.u_bfly.U.u_norm.off_q2 < -2) n_cancel++; \
    if (dut.u_bfly.U.u_norm.z_q2) n_zero++; \
    if (!dut.u_bfly.U.u_norm.z_q2 && (dut.u_bfly.U.u_norm.ex < 1 || dut.u_bfly.U.u_norm.ex > 255)) n_sat++;

  `define TB_COUNT_MUL(U) \
    if (dut.u_bfly.U.prod[47]) n_mul_hi++; else n_mul_lo++; \
    if (!dut.u_bfly.U.zero_d[4] && (dut.u_bfly.U.e_norm < 1 || dut.u_bfly.U.e_norm > 255)) n_sat++;

  always @(negedge clk) begin
    if (counting) begin
      `TB_COUNT_ADD(u_add_tre)
      `TB_COUNT_ADD(u_add_tim)
      `TB_COUNT_ADD(u_add_xre)
      `TB_COUNT_ADD(u_add_xim)
      `TB_COUNT_ADD(u_add_yre)
      `TB_COUNT_ADD(u_add_yim)
      `TB_COUNT_MUL(u_mul_rr)
      `TB_COUNT_MUL(u_mul_ii)
      `TB_COUNT_MUL(u_mul_ri)
      `TB_COUNT_MUL(u_mul_ir)
    end
  end

  // Output checker
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      logic [127:0] e;
      int t0;
      done++;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("FAIL unexpected out_valid");
      end else begin
        e  = exp_q.pop_front();
        t0 = t_q.pop_front();
        if ({x_re, x_im, y_re, y_im} !== e) begin
          failures++;
          if (failures < 10) $display("FAIL result %0d got %h expected %h", done, {x_re, x_im, y_re, y_im}, e);
        end
        if (cycle - t0 != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d", cycle - t0);
        end
      end
    end
  end

  function automatic logic [127:0] ref_bfly(logic [31:0] ar, ai, br, bi, wr, wi);
    logic [31:0] tr, ti;
    tr = r_t::add(r_t::mul(br, wr), r_t::mul(bi, wi), 1'b1);
    ti = r_t::add(r_t::mul(br, wi), r_t::mul(bi, wr), 1'b0);
    return {r_t::add(ar, tr, 1'b0), r_t::add(ai, ti, 1'b0),
            r_t::add(ar, tr, 1'b1), r_t::add(ai, ti, 1'b1)};
  endfunction

  initial begin : stimulus
    rst = 1'b1;
    in_valid = 1'b0;
    {a_re, a_im, b_re, b_im, w_re, w_im} = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < N - 3 * LAT; i++) begin
      @(negedge clk);
      if (i == LAT) counting = 1'b1;
      in_valid = ($urandom_range(3) != 0);
      case (i % 6)
        0: begin   // ordinary FFT-like data
          a_re = r_t::rnd(8);  a_im = r_t::rnd(8);  b_re = r_t::rnd(8); b_im = r_t::rnd(8);
          w_re = r_t::rnd(1);  w_im = r_t::rnd(1);
        end
        1: begin   // w*b nearly cancels a: long leading-one search, zero results
          b_re = r_t::rnd(4);  b_im = r_t::rnd(4);  w_re = r_t::make(0, 127, 0); w_im = '0;
          a_re = r_t::near(b_re);  a_im = b_im;
        end
        2: begin   // widely different magnitudes: operand shifted out completely
          a_re = r_t::rnd(100); a_im = r_t::rnd(100); b_re = r_t::rnd(100); b_im = r_t::rnd(100);
          w_re = r_t::rnd(2);   w_im = r_t::rnd(2);
        end
        3: begin   // products overflow or underflow
          a_re = r_t::rnd(8);  a_im = r_t::rnd(8);
          b_re = r_t::make(0, 250, $urandom); b_im = r_t::make(1, 5, $urandom);
          w_re = r_t::make(0, 200, $urandom); w_im = r_t::make(0, 60, $urandom);
        end
        default: begin
          a_re = r_t::rnd(20); a_im = r_t::rnd(20); b_re = r_t::rnd(20); b_im = r_t::rnd(20);
          w_re = r_t::rnd(1);  w_im = r_t::rnd(1);
        end
      endcase
      if (in_valid) begin
        started++;
        exp_q.push_back(ref_bfly(a_re, a_im, b_re, b_im, w_re, w_im));
        t_q.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (done != started || exp_q.size() != 0) begin
      failures++;
      $display("FAIL started %0d finished %0d", started, done);
    end
    $display("butterflies %0d; swap %0d, set-to-zero %0d, subtract %0d, carry %0d, cancellation %0d, zero %0d, saturate/underflow %0d, mul>=2 %0d, mul<2 %0d",
             done, n_swap, n_setzero, n_sub, n_carry, n_cancel, n_zero, n_sat, n_mul_hi, n_mul_lo);
    checks++;
    if (n_swap == 0 || n_setzero == 0 || n_sub == 0 || n_carry == 0 || n_cancel == 0 ||
        n_zero == 0 || n_sat == 0 || n_mul_hi == 0 || n_mul_lo == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
