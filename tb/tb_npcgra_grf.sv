// tb_npcgra_grf: self-checking test of the single-port global register file.
// Writes random weights, reads every index, checks that a write cycle
// occupies the port (read data zero) and that out-of-range indices read zero.
module tb_npcgra_grf;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  logic [3:0] waddr = 0, ridx = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [9];
  int checks = 0, failures = 0;

  npcgra_grf dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .ridx(ridx), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < 9; i++) begin
      ridx = 4'(i); #1; checks++; if (rdata !== 0) failures++;   // reset value
    end
    for (int round = 0; round < 5; round++) begin
      for (int i = 0; i < 9; i++) begin
        we = 1; waddr = 4'(i); wdata = 16'($urandom); model[i] = wdata;
        ridx = 4'($urandom_range(0, 8));
        #1; checks++; if (rdata !== 0) failures++;             // port busy
        @(negedge clk);
      end
      we = 0;
      for (int i = 0; i < 16; i++) begin
        ridx = 4'(i); #1;
        checks++;
        if (rdata !== ((i < 9) ? model[i] : 16'h0)) begin
          failures++;
          $display("FAIL idx %0d rdata=%h", i, rdata);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
