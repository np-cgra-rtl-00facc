// tb_npcgra_agu: self-checking test of the two-level strided AGU.
// Programs random base/count/strides, steps it with random gaps and compares
// every address with base + i*s0 + j*s1 computed here.
module tb_npcgra_agu;
  logic clk = 0, rst_n = 0;
  logic [11:0] base, n0, s0, s1, addr;
  logic restart = 0, step = 0;
  int checks = 0, failures = 0;

  npcgra_agu #(.AW(12), .CW(12)) dut (.clk(clk), .rst_n(rst_n), .base(base), .n0(n0), .s0(s0),
    .s1(s1), .restart(restart), .step(step), .addr(addr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, j;
    logic [11:0] exp;
    base = 0; n0 = 1; s0 = 1; s1 = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 20; t++) begin
      base <= 12'($urandom_range(0, 2000)); n0 <= 12'($urandom_range(1, 9));
      s0 <= 12'($urandom_range(0, 5)); s1 <= 12'($urandom_range(0, 40));
      @(posedge clk); restart <= 1; @(posedge clk); restart <= 0;
      i = 0; j = 0;
      for (int k = 0; k < 60; k++) begin
        step <= ($urandom_range(0, 3) != 0);
        @(negedge clk);
        exp = 12'(int'(base) + i * int'(s0) + j * int'(s1));
        checks++;
        if (addr !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d addr=%0d exp=%0d", t, k, addr, exp);
        end
        @(posedge clk);
        if (step) begin
          i++;
          if (i >= int'(n0)) begin i = 0; j++; end
        end
      end
      step <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
