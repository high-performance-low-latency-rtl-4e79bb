// tb_fp_normalize: self-checking testbench of the three-stage parallel normaliser.
//
// Unnormalised 25-bit sums with the leading one at every position (0..24, so every one of
// the seven find-first-one modules is selected), all-zero sums, and exponents chosen so that
// some results underflow or overflow, are applied every cycle. Three cycles later the packed
// result must match a normalisation done here bit by bit with a loop.
module tb_fp_normalize;
  localparam int N = 5000;
  localparam int L = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [24:0] u;
  logic [7:0]  e;
  logic        s;
  logic [31:0] y;

  fp_normalize dut (.clk, .u_i(u), .e_i(e), .sign_i(s), .result_o(y));

  logic [31:0] ex [N];
  int checks = 0, failures = 0;
  int pos_seen [25];
  int n_under = 0, n_over = 0, n_zero = 0;

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
        checks++;
        if (y !== ex[i-L]) begin
          failures++;
          if (failures < 10) $display("FAIL #%0d got %h expected %h", i - L, y, ex[i-L]);
        end
      end
      if (i < N) begin
        int p, ee;
        logic [24:0] n;
        p = $urandom_range(25) - 1;           // -1: all zero
        u = (p < 0) ? 25'd0 : ((25'd1 << p) | (25'($urandom) & ((25'd1 << p) - 1)));
        if (i % 10 == 0)     e = 8'd255;                 // overflow when the carry bit is set
        else if (i % 10 == 5) e = 8'($urandom_range(10));  // underflow after a long shift
        else                 e = 8'($urandom_range(200, 30));
        s = 1'($urandom);
        if (p < 0) begin
          ex[i] = '0;
          n_zero++;
        end else begin
          pos_seen[p]++;
          n  = u << (24 - p);                   // leading one to bit 24
          ee = int'(e) + p - 23;                // bit 23 of u is the 2^0 position
          if (ee < 1) begin
            ex[i] = '0;
            n_under++;
          end else if (ee > 255) begin
            ex[i] = {s, 8'hff, 23'h7fffff};
            n_over++;
          end else begin
            ex[i] = {s, 8'(ee), n[23:1]};
          end
        end
      end
    end
    foreach (pos_seen[k]) begin
      checks++;
      if (pos_seen[k] == 0) failures++;
    end
    checks++;
    if (n_under == 0 || n_over == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
