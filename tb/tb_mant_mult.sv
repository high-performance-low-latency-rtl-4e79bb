// tb_mant_mult: self-checking testbench of the pipelined mantissa multiplier.
//
// Two instances: 24-bit operands (four-slice product, latency 5) and 16-bit operands
// (one slice, latency 2). Random operands, including all-ones and zero, enter every cycle;
// each product is compared with the integer product exactly at the expected latency.
module tb_mant_mult;
  localparam int N = 4000;
  localparam int L1 = 5;
  localparam int L2 = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [23:0] a1, b1;
  logic [47:0] p1;
  logic [15:0] a2, b2;
  logic [31:0] p2;

  mant_mult            dut1 (.clk, .a(a1), .b(b1), .p(p1));
  mant_mult #(.W(16))  dut2 (.clk, .a(a2), .b(b2), .p(p2));

  logic [47:0] e1 [N];
  logic [31:0] e2 [N];
  int checks = 0, failures = 0;

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
        if (p1 !== e1[i-L1]) begin
          failures++;
          if (failures < 10) $display("FAIL 24-bit #%0d got %h expected %h", i - L1, p1, e1[i-L1]);
        end
      end
      if (i >= L2 && i - L2 < N) begin
        checks++;
        if (p2 !== e2[i-L2]) begin
          failures++;
          if (failures < 10) $display("FAIL 16-bit #%0d got %h expected %h", i - L2, p2, e2[i-L2]);
        end
      end
      if (i < N) begin
        a1 = (i % 50 == 0) ? 24'hffffff : 24'($urandom);
        b1 = (i % 50 == 0) ? 24'hffffff : (i % 71 == 0) ? 24'd0 : 24'($urandom);
        a2 = 16'($urandom);
        b2 = (i % 50 == 0) ? 16'hffff : 16'($urandom);
        e1[i] = 48'(a1) * 48'(b1);
        e2[i] = 32'(a2) * 32'(b2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
