// tb_npcgra_local_mem: self-checking test of one H-MEM/V-MEM side.
// The host fills both sets of all banks with distinct patterns; the array
// port then reads with a shared address (one word per bank, one cycle later,
// held while not reading), from each set; array stores are read back by the
// host; host reads of the other set while the array is busy are checked.
module tb_npcgra_local_mem;
  localparam int NB = 8, D = 2496;
  logic clk = 0, rst_n = 0;
  logic arr_set = 0, arr_rd = 0, arr_wr = 0;
  logic [11:0] arr_raddr = 0, arr_waddr = 0;
  logic [15:0] arr_rdata [NB];
  logic [15:0] arr_wdata [NB];
  logic host_en = 0, host_we = 0, host_set = 0;
  logic [2:0] host_bank = 0;
  logic [11:0] host_addr = 0;
  logic [15:0] host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  npcgra_local_mem #(.NBANK(NB), .DEPTH(D), .SETS(2)) dut (.clk(clk), .rst_n(rst_n),
    .arr_set(arr_set), .arr_rd(arr_rd), .arr_raddr(arr_raddr), .arr_rdata(arr_rdata),
    .arr_wr(arr_wr), .arr_waddr(arr_waddr), .arr_wdata(arr_wdata),
    .host_en(host_en), .host_we(host_we), .host_set(host_set), .host_bank(host_bank),
    .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata));

  always #5 clk = ~clk;

  function automatic logic [15:0] pat(int s, int b, int a);
    return 16'((s * 40503 + b * 977 + a * 31 + 7) & 16'hffff);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int addrs [10] = '{0, 1, 2, 100, 777, 1234, 2000, 2494, 2495, 5};

  initial begin
    for (int b = 0; b < NB; b++) arr_wdata[b] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // host fills the tested addresses of both sets
    for (int s = 0; s < 2; s++) for (int b = 0; b < NB; b++) foreach (addrs[i]) begin
      host_en = 1; host_we = 1; host_set = 1'(s); host_bank = 3'(b);
      host_addr = 12'(addrs[i]); host_wdata = pat(s, b, addrs[i]);
      @(negedge clk);
    end
    host_en = 0; host_we = 0;
    // array reads, both sets
    for (int s = 0; s < 2; s++) foreach (addrs[i]) begin
      arr_set = 1'(s); arr_rd = 1; arr_raddr = 12'(addrs[i]);
      @(negedge clk);
      arr_rd = 0; arr_raddr = 12'($urandom_range(0, D - 1));
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (arr_rdata[b] !== pat(s, b, addrs[i])) begin
          failures++; $display("FAIL set %0d bank %0d addr %0d: %h", s, b, addrs[i], arr_rdata[b]);
        end
      end
      @(negedge clk);   // data held while not reading
      for (int b = 0; b < NB; b++) begin
        checks++; if (arr_rdata[b] !== pat(s, b, addrs[i])) failures++;
      end
    end
    // array stores into set 1 while the host reads set 0
    arr_set = 1;
    for (int k = 0; k < 4; k++) begin
      arr_wr = 1; arr_waddr = 12'(300 + k);
      for (int b = 0; b < NB; b++) arr_wdata[b] = 16'(k * 256 + b);
      host_en = 1; host_we = 0; host_set = 0; host_bank = 3'(k); host_addr = 12'(addrs[k]);
      @(negedge clk);
      checks++; if (host_rdata !== pat(0, k, addrs[k])) begin failures++; $display("FAIL host rd"); end
    end
    arr_wr = 0;
    for (int k = 0; k < 4; k++) for (int b = 0; b < NB; b++) begin
      host_en = 1; host_we = 0; host_set = 1; host_bank = 3'(b); host_addr = 12'(300 + k);
      @(negedge clk);
      checks++;
      if (host_rdata !== 16'(k * 256 + b)) begin failures++; $display("FAIL store %0d %0d: %h", k, b, host_rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
