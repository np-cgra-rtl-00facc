// tb_npcgra_weight_buffer: self-checking test of the Weight Buffer transfer.
// Fills all 144 rows with random data, then loads several copies (including
// the first and the last, 63) and checks that GRF entries 0..8 receive words
// 9c..9c+8 in order, one per cycle, that busy lasts 10 cycles, and that a
// load request during busy is ignored.
module tb_npcgra_weight_buffer;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, load = 0;
  logic [7:0] wr_addr = 0;
  logic [63:0] wr_data = 0;
  logic [5:0] copy = 0;
  logic busy, grf_we;
  logic [3:0] grf_waddr;
  logic [15:0] grf_wdata;
  logic [63:0] rows [144];
  int checks = 0, failures = 0;

  npcgra_weight_buffer dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr),
    .wr_data(wr_data), .load(load), .copy(copy), .busy(busy), .grf_we(grf_we),
    .grf_waddr(grf_waddr), .grf_wdata(grf_wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] word(int w);
    return rows[w / 4][(w % 4) * 16 +: 16];
  endfunction

  initial begin
    int copies [6] = '{0, 1, 5, 33, 62, 63};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < 144; i++) begin
      rows[i] = {$urandom, $urandom};
      wr_en = 1; wr_addr = 8'(i); wr_data = rows[i];
      @(negedge clk);
    end
    wr_en = 0;
    foreach (copies[n]) begin
      int got, busy_cycles;
      got = 0; busy_cycles = 0;
      load = 1; copy = 6'(copies[n]);
      @(negedge clk);
      load = 0;
      for (int t = 0; t < 14; t++) begin
        if (t == 3) begin load = 1; copy = 6'(copies[n] ^ 1); end   // ignored while busy
        if (t == 4) load = 0;
        if (busy) busy_cycles++;
        if (grf_we) begin
          checks++;
          if (grf_waddr != 4'(got) || grf_wdata != word(copies[n] * 9 + got)) begin
            failures++;
            $display("FAIL copy %0d entry %0d: addr %0d data %h exp %h", copies[n], got,
                     grf_waddr, grf_wdata, word(copies[n] * 9 + got));
          end
          got++;
        end
        @(negedge clk);
      end
      checks++; if (got != 9) begin failures++; $display("FAIL %0d writes", got); end
      checks++; if (busy_cycles != 10) begin failures++; $display("FAIL busy %0d", busy_cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
