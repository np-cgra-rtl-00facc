// tb_npcgra_config_mem: self-checking test of the 32 x 2312-bit context memory.
// Writes random contexts slice by slice, reads them back in random order
// (word one cycle after rd_en) and checks the all-zero output when idle.
module tb_npcgra_config_mem;
  localparam int CW = 2312, NSL = 73;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [4:0] wr_addr = 0, rd_addr = 0;
  logic [6:0] wr_slice = 0;
  logic [31:0] wr_data = 0;
  logic [CW-1:0] ctx;
  logic [NSL*32-1:0] model [32];
  int checks = 0, failures = 0;

  npcgra_config_mem dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr),
    .wr_slice(wr_slice), .wr_data(wr_data), .rd_en(rd_en), .rd_addr(rd_addr), .ctx(ctx));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int a = 0; a < 32; a++) for (int s = 0; s < NSL; s++) begin
      wr_en = 1; wr_addr = 5'(a); wr_slice = 7'(s); wr_data = $urandom;
      model[a][s*32 +: 32] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int n = 0; n < 100; n++) begin
      rd_en = ($urandom_range(0, 3) != 0); rd_addr = 5'($urandom_range(0, 31));
      @(negedge clk);
      checks++;
      if (ctx !== (rd_en ? model[rd_addr][CW-1:0] : '0)) begin
        failures++; $display("FAIL read %0d en %0b", rd_addr, rd_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
