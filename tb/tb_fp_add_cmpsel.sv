// tb_fp_add_cmpsel: self-checking testbench of the adder's compare/select step.
//
// Random operand pairs (many with equal exponents, so that the mantissa compare decides,
// and zeros) are applied every cycle; two cycles later the larger exponent, the exponent
// difference, the larger and smaller mantissas with their implicit ones, the result sign and
// the subtract flag are compared with values computed here from the operands' magnitudes.
module tb_fp_add_cmpsel;
  import fp_pkg::*;

  localparam int N = 5000;
  localparam int L = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  addsub_op_e  op;
  logic [7:0]  e_big, diff;
  logic [23:0] m_big, m_small;
  logic        sign, sub;

  fp_add_cmpsel dut (.clk, .a, .b, .op, .e_big, .diff, .m_big, .m_small, .sign, .sub);

  typedef struct packed {
    logic [7:0]  e_big, diff;
    logic [23:0] m_big, m_small;
    logic        sign, sub;
  } exp_t;
  exp_t ex [N];
  int checks = 0, failures = 0, n_swap = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        exp_t got;
        got = {e_big, diff, m_big, m_small, sign, sub};
        checks++;
        if (got !== ex[i-L]) begin
          failures++;
          if (failures < 10) $display("FAIL #%0d got %h expected %h", i - L, got, ex[i-L]);
        end
      end
      if (i < N) begin
        int unsigned ea, eb;
        logic [23:0] ma, mb;
        logic sb;
        ea = $urandom_range(255);
        eb = (i % 2 == 0) ? ea : $urandom_range(255);
        if (i % 17 == 0) ea = 0;
        a  = {1'($urandom), 8'(ea), 23'($urandom)};
        b  = {1'($urandom), 8'(eb), 23'($urandom)};
        if (i % 13 == 0) b[22:0] = a[22:0];
        op = addsub_op_e'($urandom_range(1));
        ma = (ea == 0) ? 24'd0 : {1'b1, a[22:0]};
        mb = (eb == 0) ? 24'd0 : {1'b1, b[22:0]};
        sb = b[31] ^ (op == OP_SUB);
        if ({8'(eb), mb} > {8'(ea), ma}) begin
          n_swap++;
          ex[i] = {8'(eb), 8'(eb - ea), mb, ma, sb, a[31] ^ sb};
        end else begin
          ex[i] = {8'(ea), 8'(ea - eb), ma, mb, a[31], a[31] ^ sb};
        end
      end
    end
    checks++;
    if (n_swap == 0 || n_swap == N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
