// tb_npcgra_controller: self-checking test of the context sequencer.
// For several loop settings the issued context addresses are compared with
// the expected prologue / loop body x loop_cnt / epilogue order, one context
// per cycle with no gaps; ctx_valid must follow cfg_rd by one cycle and done
// must pulse one cycle after the last context executed.
module tb_npcgra_controller;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] loop_start, loop_end, last_pc, cfg_addr;
  logic [15:0] loop_cnt;
  logic cfg_rd, ctx_valid, agu_restart, busy, done;
  int checks = 0, failures = 0;

  npcgra_controller dut (.clk(clk), .rst_n(rst_n), .start(start), .loop_start(loop_start),
    .loop_end(loop_end), .last_pc(last_pc), .loop_cnt(loop_cnt), .cfg_rd(cfg_rd),
    .cfg_addr(cfg_addr), .ctx_valid(ctx_valid), .agu_restart(agu_restart), .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int ls, int le, int lp, int cnt);
    int exp [$];
    int got [$];
    int n, t, last_valid, done_at;
    for (int p = 0; p < ls; p++) exp.push_back(p);
    for (int i = 0; i < ((cnt == 0) ? 1 : cnt); i++) for (int p = ls; p <= le; p++) exp.push_back(p);
    for (int p = le + 1; p <= lp; p++) exp.push_back(p);
    loop_start = 5'(ls); loop_end = 5'(le); last_pc = 5'(lp); loop_cnt = 16'(cnt);
    start = 1;
    #1;
    checks++; if (!agu_restart) failures++;
    t = 0; last_valid = -1; done_at = -1;
    while (t < 200 && done_at < 0) begin
      if (cfg_rd) got.push_back(int'(cfg_addr));
      @(negedge clk);
      start = 0;
      t++;
      if (ctx_valid) last_valid = t;
      if (done) done_at = t;
    end
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL sequence ls=%0d le=%0d lp=%0d cnt=%0d got=%p exp=%p", ls, le, lp, cnt, got, exp);
    end
    checks++;
    // contexts issued in cycles 0..n-1, executed 1..n, done at n+1
    n = exp.size();
    if (last_valid != n || done_at != n + 1) begin
      failures++; $display("FAIL timing n=%0d last_valid=%0d done=%0d", n, last_valid, done_at);
    end
    checks++; if (busy) failures++;
    @(negedge clk);
  endtask

  initial begin
    loop_start = 0; loop_end = 0; last_pc = 0; loop_cnt = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    run(2, 4, 7, 3);
    run(1, 1, 11, 7);
    run(0, 0, 3, 5);
    run(0, 0, 0, 1);
    run(3, 5, 5, 2);
    run(0, 31, 31, 2);
    run(1, 17, 25, 3);
    run(2, 4, 7, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
