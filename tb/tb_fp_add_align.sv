// tb_fp_add_align: self-checking testbench of the adder's alignment step.
//
// Random mantissas and exponent differences (small ones and ones beyond the shifter's
// 5-bit range) are applied every cycle. One cycle later the aligned mantissa, with the
// set-to-zero flag applied, must equal the smaller mantissa divided by 2^diff (truncated),
// and the pass-through fields must be unchanged.
module tb_fp_add_align;
  localparam int N = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  e_i, d_i, e_o;
  logic [23:0] mb_i, ms_i, mb_o, msh_o;
  logic        s_i, sub_i, z_o, s_o, sub_o;

  fp_add_align dut (
    .clk, .e_big_i(e_i), .diff_i(d_i), .m_big_i(mb_i), .m_small_i(ms_i), .sign_i(s_i),
    .sub_i(sub_i), .e_big_o(e_o), .m_big_o(mb_o), .m_shift_o(msh_o), .set_zero_o(z_o),
    .sign_o(s_o), .sub_o(sub_o)
  );

  int checks = 0, failures = 0, n_zero = 0;
  logic [23:0] exp_m;
  logic [33:0] exp_pass;

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
        if ((z_o ? 24'd0 : msh_o) !== exp_m || {e_o, mb_o, s_o, sub_o} !== exp_pass) begin
          failures++;
          if (failures < 10) $display("FAIL #%0d got %h/%b expected %h", i - 1, msh_o, z_o, exp_m);
        end
        if (z_o) n_zero++;
      end
      e_i   = 8'($urandom);
      d_i   = (i % 3 == 0) ? 8'($urandom) : 8'($urandom_range(30));
      mb_i  = 24'($urandom);
      ms_i  = {1'b1, 23'($urandom)};
      s_i   = 1'($urandom);
      sub_i = 1'($urandom);
      exp_m    = (d_i >= 24) ? 24'd0 : 24'(ms_i / (32'd1 << d_i));
      exp_pass = {e_i, mb_i, s_i, sub_i};
    end
    checks++;
    if (n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
