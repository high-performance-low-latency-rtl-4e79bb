// tb_fp_add: self-checking testbench of the floating point adder/subtractor.
//
// Two instances run side by side: the default single precision layout (23-bit fraction,
// 8-bit exponent) and the 15-bit fraction, 10-bit exponent format. Every cycle both get a
// new operand pair: random numbers, near-equal pairs that cancel many leading bits, zeros,
// large exponent differences and operands that overflow or underflow. Each result is
// compared, exactly 7 cycles after its inputs, with fp_ref_pkg's reference arithmetic. For
// the default format the reference itself is checked against shortreal arithmetic (the
// truncated result must lie within two units in the last place of the exact sum).
module tb_fp_add;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 20000;
  localparam int L = 7;

  typedef fp_ref #(23, 8)  r1_t;
  typedef fp_ref #(15, 10) r2_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a1, b1, y1;
  logic [25:0] a2, b2, y2;
  addsub_op_e  op1, op2;

  fp_add                     dut1 (.clk, .a(a1), .b(b1), .op(op1), .result(y1));
  fp_add #(.MW(15), .EW(10)) dut2 (.clk, .a(a2), .b(b2), .op(op2), .result(y2));

  logic [31:0] e1 [N];
  logic [25:0] e2 [N];
  int checks = 0, failures = 0;
  int n_cancel = 0, n_far = 0, n_zero = 0, n_carry = 0;

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick1(int i);
    logic [31:0] x;
    case (i % 8)
      0, 1, 2: x = r1_t::rnd(20);
      3:       x = r1_t::rnd(120);
      default: x = r1_t::rnd(4);
    endcase
    return x;
  endfunction

  function automatic logic [25:0] pick2(int i);
    logic [25:0] x;
    case (i % 8)
      0, 1, 2: x = r2_t::rnd(20);
      3:       x = r2_t::rnd(500);
      default: x = r2_t::rnd(4);
    endcase
    return x;
  endfunction

  initial begin : stimulus
    shortreal ra, rb, rr, ry;
    real      err, ulp;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        int j;
        j = i - L;
        checks++;
        if (y1 !== e1[j]) begin
          failures++;
          if (failures < 10) $display("FAIL sp #%0d: got %h expected %h", j, y1, e1[j]);
        end
        checks++;
        if (y2 !== e2[j]) begin
          failures++;
          if (failures < 10) $display("FAIL 15/10 #%0d: got %h expected %h", j, y2, e2[j]);
        end
      end
      if (i < N) begin
        a1  = pick1(i);
        b1  = (i % 3 == 0) ? r1_t::near(a1) : pick1(i + 5);
        op1 = addsub_op_e'($urandom_range(1));
        a2  = pick2(i);
        b2  = (i % 3 == 0) ? r2_t::near(a2) : pick2(i + 5);
        op2 = addsub_op_e'($urandom_range(1));
        if (i % 101 == 0) a1 = '0;
        if (i % 97 == 0)  begin b1 = a1; op1 = OP_SUB; end
        e1[i] = r1_t::add(a1, b1, op1 == OP_SUB);
        e2[i] = r2_t::add(a2, b2, op2 == OP_SUB);
        if (e1[i] == '0) n_zero++;
        if (r1_t::expo(e1[i]) > 0 && r1_t::expo(e1[i]) + 4 <= r1_t::expo(a1) &&
            r1_t::expo(e1[i]) + 4 <= r1_t::expo(b1)) n_cancel++;
        if (r1_t::expo(a1) - r1_t::expo(b1) > 31 || r1_t::expo(b1) - r1_t::expo(a1) > 31)
          n_far++;
        if (r1_t::expo(e1[i]) > r1_t::expo(a1) && r1_t::expo(e1[i]) > r1_t::expo(b1)) n_carry++;
        // Independent check of the reference: within 2 ulp of shortreal arithmetic, for
        // results that are neither zero nor near the edges of the exponent range.
        if (r1_t::expo(a1) > 30 && r1_t::expo(a1) < 220 && r1_t::expo(b1) > 30 &&
            r1_t::expo(b1) < 220 && e1[i] != '0) begin
          ra = $bitstoshortreal(a1);
          rb = $bitstoshortreal(b1);
          rr = (op1 == OP_SUB) ? ra - rb : ra + rb;
          ry = $bitstoshortreal(e1[i]);
          err = (real'(rr) >= real'(ry)) ? real'(rr) - real'(ry) : real'(ry) - real'(rr);
          ulp = 2.0 ** (r1_t::expo(e1[i]) - 127 - 23);
          checks++;
          if (err > 2.0 * ulp) begin
            failures++;
            if (failures < 10) $display("FAIL reference vs shortreal #%0d", i);
          end
        end
      end
    end
    $display("cases: cancellation %0d, far operands %0d, zero results %0d, carry %0d",
             n_cancel, n_far, n_zero, n_carry);
    checks++;
    if (n_cancel == 0 || n_far == 0 || n_zero == 0 || n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
