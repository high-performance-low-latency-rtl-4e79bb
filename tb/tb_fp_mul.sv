// tb_fp_mul: self-checking testbench of the floating point multiplier.
//
// Two instances: single precision layout (latency 6) and the 15-bit fraction, 10-bit
// exponent format (latency 3). Random operands, zeros and exponent combinations that
// overflow and underflow enter every cycle; results are compared with fp_ref_pkg at exactly
// the expected latency. For single precision the reference is also checked against
// shortreal multiplication (within two units in the last place). Both normalisation cases
// (product in [1,2) and in [2,4)) must occur.
module tb_fp_mul;
  import fp_ref_pkg::*;

  localparam int N  = 20000;
  localparam int L1 = 6;
  localparam int L2 = 3;

  typedef fp_ref #(23, 8)  r1_t;
  typedef fp_ref #(15, 10) r2_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a1, b1, y1;
  logic [25:0] a2, b2, y2;

  fp_mul                     dut1 (.clk, .a(a1), .b(b1), .result(y1));
  fp_mul #(.MW(15), .EW(10)) dut2 (.clk, .a(a2), .b(b2), .result(y2));

  logic [31:0] e1 [N];
  logic [25:0] e2 [N];
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0, n_over = 0, n_under = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < N + L1; i++) begin
      @(negedge clk);
      if (i >= L1) begin
        checks++;
        if (y1 !== e1[i-L1]) begin
          failures++;
          if (failures < 10) $display("FAIL sp #%0d got %h expected %h", i - L1, y1, e1[i-L1]);
        end
      end
      if (i >= L2 && i - L2 < N) begin
        checks++;
        if (y2 !== e2[i-L2]) begin
          failures++;
          if (failures < 10) $display("FAIL 15/10 #%0d got %h expected %h", i - L2, y2, e2[i-L2]);
        end
      end
      if (i < N) begin
        int span1, span2;
        span1 = (i % 4 == 0) ? 126 : 40;
        span2 = (i % 4 == 0) ? 510 : 200;
        a1 = r1_t::rnd(span1);  b1 = r1_t::rnd(span1);
        a2 = r2_t::rnd(span2);  b2 = r2_t::rnd(span2);
        e1[i] = r1_t::mul(a1, b1);
        e2[i] = r2_t::mul(a2, b2);
        if (r1_t::expo(a1) > 0 && r1_t::expo(b1) > 0) begin
          int es;
          es = r1_t::expo(a1) + r1_t::expo(b1) - 127;
          if (es > 255) n_over++;
          if (es < 1)   n_under++;
          if (es > 20 && es < 230) begin
            real rr, ry, err;
            if (r1_t::expo(e1[i]) > es) n_hi++; else n_lo++;
            rr = real'($bitstoshortreal(a1)) * real'($bitstoshortreal(b1));
            ry = real'($bitstoshortreal(e1[i]));
            err = (rr > ry) ? rr - ry : ry - rr;
            checks++;
            if (err > 2.0 * (2.0 ** (r1_t::expo(e1[i]) - 150))) begin
              failures++;
              if (failures < 10) $display("FAIL reference vs real #%0d", i);
            end
          end
        end
      end
    end
    $display("cases: product >= 2: %0d, product < 2: %0d, overflow %0d, underflow %0d",
             n_hi, n_lo, n_over, n_under);
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_over == 0 || n_under == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
