// tb_fp_add_addsub: self-checking testbench of the adder's bit-cell adder/subtractor.
//
// Random mantissa pairs with A >= B are added or subtracted, sometimes with set_zero on;
// one cycle later the 25-bit result must equal A + B, A - B or A, computed here with
// ordinary integer arithmetic, and exponent and sign must be passed through.
module tb_fp_add_addsub;
  localparam int N = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  e_i, e_o;
  logic [23:0] a_i, b_i;
  logic        z_i, sub_i, s_i, s_o;
  logic [24:0] sum_o;

  fp_add_addsub dut (.clk, .e_i, .a_i, .b_i, .set_zero_i(z_i), .sub_i, .sign_i(s_i),
                     .e_o, .sum_o, .sign_o(s_o));

  int checks = 0, failures = 0, n_carry = 0, n_sub = 0;
  logic [33:0] expv;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i <= N; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if ({e_o, sum_o, s_o} !== expv) begin
          failures++;
          if (failures < 10) $display("FAIL #%0d got %h expected %h", i - 1, {e_o, sum_o, s_o}, expv);
        end
        if (sum_o[24]) n_carry++;
      end
      a_i   = {1'b1, 23'($urandom)};
      b_i   = 24'($urandom) >> $urandom_range(23);
      if (b_i > a_i) b_i = a_i;
      if (i % 50 == 0) b_i = a_i;
      z_i   = ($urandom_range(7) == 0);
      sub_i = 1'($urandom);
      if (sub_i) n_sub++;
      e_i   = 8'($urandom);
      s_i   = 1'($urandom);
      expv  = {e_i, sub_i ? 25'(a_i) - 25'(z_i ? 24'd0 : b_i)
                          : 25'(a_i) + 25'(z_i ? 24'd0 : b_i), s_i};
    end
    checks++;
    if (n_carry == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
