// tb_npcgra_top: end-to-end test of NP-CGRA at its default size (8x8 PEs,
// 16-bit words, 2 x 2 x 39 KB local memory, 32 contexts).
// The host loads data into H-MEM/V-MEM, weights into the Weight Buffer or
// GRF, and context words into the configuration memory, starts a kernel and
// reads the results back, comparing them with values computed here.
//   1. Pointwise convolution (matrix multiplication) tile, output
//      stationary: X rows on the H-busses, W columns on the V-busses, one
//      single-cycle MAC per PE per cycle; inner size 16, 40 (on memory set 1
//      after a set swap) and 2304, the im2col row length of AlexNet conv3,
//      which nearly fills a 2496-word bank. Cycle count = Kd + 9 contexts.
//   2. The same program with MAC chaining switched off: Out holds the last
//      product only.
//   3. Depthwise convolution, stride 1, K = 3: prologue of Nc-1 cycles, then
//      the EE / SS / EW / SS / EE phases of the operand reuse network with the
//      weight broadcast from the GRF, Nc-1+K^2 = 16 compute cycles. Weights
//      come once from the Weight Buffer and once by direct GRF writes.
//   4. Depthwise convolution, stride 2, K = 3: input rows streamed on the
//      H-busses, per-column weights on the V-busses, each PE doing a MAC only
//      when its window is on the bus (K x (S(Nc-1)+K) = 51 cycles).
// Each mechanism (H/V streamed loads, stores, each reuse direction, GRF
// broadcast, Weight Buffer transfer, direct GRF write, chained and unchained
// MAC, both memory sets, loop repetition) is counted and must occur.
module tb_npcgra_top;
  import npcgra_pkg::*;

  localparam int N = 8;
  localparam int NSL = (CTX_W + 31) / 32;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic host_cfg_we = 0;
  logic [4:0] host_cfg_addr = 0;
  logic [6:0] host_cfg_slice = 0;
  logic [31:0] host_cfg_wdata = 0;
  logic host_reg_we = 0;
  logic [4:0] host_reg_addr = 0;
  logic [31:0] host_reg_wdata = 0;
  logic host_mem_en = 0, host_mem_we = 0, host_mem_vsel = 0, host_mem_set = 0;
  logic [2:0] host_mem_bank = 0;
  logic [11:0] host_mem_addr = 0;
  logic [15:0] host_mem_wdata = 0, host_mem_rdata;
  logic host_wb_we = 0, host_wb_load = 0, wb_busy;
  logic [7:0] host_wb_addr = 0;
  logic [63:0] host_wb_wdata = 0;
  logic [5:0] host_wb_copy = 0;
  logic host_grf_we = 0;
  logic [3:0] host_grf_addr = 0;
  logic [15:0] host_grf_wdata = 0;

  npcgra_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_hld, n_vld, n_hst, n_grf, n_mac_chain, n_mac_plain, n_set1, n_wrap, n_wb, n_grf_host;
  int n_reuse [4];
  always @(posedge clk) if (rst_n) begin
    if (dut.glb.h_ld) n_hld++;
    if (dut.glb.v_ld) n_vld++;
    if (dut.glb.h_st) n_hst++;
    if (dut.glb.h_st && dut.arr_set) n_set1++;
    if (dut.u_ctrl.cfg_rd && dut.u_ctrl.wrap) n_wrap++;
    if (dut.wb_grf_we) n_wb++;
    if (host_grf_we) n_grf_host++;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      if (dut.pe_cfg[r][c].sel_b == SRC_GRF && dut.pe_cfg[r][c].op != OP_NOP) n_grf++;
      if (dut.pe_cfg[r][c].op == OP_MAC) begin
        if (dut.mac_chain) n_mac_chain++; else n_mac_plain++;
      end
      if (dut.pe_cfg[r][c].rf_we && dut.pe_cfg[r][c].rf_wsel == RFW_REUSE)
        n_reuse[dut.pe_cfg[r][c].reuse]++;
    end
  end

  // ---------------- host helpers ----------------
  ctx_t C [32];

  task automatic clear_ctx();
    for (int k = 0; k < 32; k++) C[k] = '0;
  endtask

  task automatic write_ctx(int n);
    logic [NSL*32-1:0] padded;
    for (int k = 0; k < n; k++) begin
      padded = (NSL*32)'(C[k]);
      for (int s = 0; s < NSL; s++) begin
        host_cfg_we = 1; host_cfg_addr = 5'(k); host_cfg_slice = 7'(s);
        host_cfg_wdata = padded[s*32 +: 32];
        @(negedge clk);
      end
    end
    host_cfg_we = 0;
  endtask

  task automatic reg_wr(int a, int d);
    host_reg_we = 1; host_reg_addr = 5'(a); host_reg_wdata = 32'(d);
    @(negedge clk);
    host_reg_we = 0;
  endtask

  task automatic agu_set(int which, int base, int n0, int s0, int s1);
    reg_wr(5 + which * 4, base); reg_wr(6 + which * 4, n0);
    reg_wr(7 + which * 4, s0);   reg_wr(8 + which * 4, s1);
  endtask

  task automatic loop_set(int ls, int le, int lp, int cnt);
    reg_wr(0, ls); reg_wr(1, le); reg_wr(2, lp); reg_wr(3, cnt);
  endtask

  task automatic mem_wr(bit v, bit set, int bank, int addr, logic [15:0] d);
    host_mem_en = 1; host_mem_we = 1; host_mem_vsel = v; host_mem_set = set;
    host_mem_bank = 3'(bank); host_mem_addr = 12'(addr); host_mem_wdata = d;
    @(negedge clk);
    host_mem_en = 0; host_mem_we = 0;
  endtask

  task automatic mem_rd(bit v, bit set, int bank, int addr, output logic [15:0] d);
    host_mem_en = 1; host_mem_we = 0; host_mem_vsel = v; host_mem_set = set;
    host_mem_bank = 3'(bank); host_mem_addr = 12'(addr);
    @(negedge clk);
    host_mem_en = 0;
    d = host_mem_rdata;
  endtask

  // start the kernel and return the number of cycles until done
  task automatic run(output int cycles);
    cycles = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    check_int("busy after done", int'(busy), 0);
  endtask

  // all PEs get the same configuration
  task automatic all_pe(int k, pe_cfg_t p);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) C[k].pe[r][c] = p;
  endtask

  // ---------------- 1/2: pointwise convolution tile ----------------
  localparam int KMAX = 2304;   // AlexNet conv3 im2col row: 256 channels x 3 x 3
  logic [15:0] X [N][KMAX];
  logic [15:0] Wm [KMAX][N];

  task automatic pwc(int kd, bit set, bit chain);
    pe_cfg_t p;
    int cyc;
    logic [15:0] got;
    for (int r = 0; r < N; r++) for (int i = 0; i < kd; i++) X[r][i] = 16'($urandom);
    for (int i = 0; i < kd; i++) for (int c = 0; c < N; c++) Wm[i][c] = 16'($urandom);
    for (int r = 0; r < N; r++) for (int i = 0; i < kd; i++) mem_wr(0, set, r, i, X[r][i]);
    for (int c = 0; c < N; c++) for (int i = 0; i < kd; i++) mem_wr(1, set, c, i, Wm[i][c]);
    clear_ctx();
    C[0].glb.h_ld = 1; C[0].glb.v_ld = 1;
    p = '0; p.sel_a = SRC_HBUS; p.sel_b = SRC_VBUS; p.op = OP_MUL;
    all_pe(1, p); C[1].glb.h_ld = 1; C[1].glb.v_ld = 1;
    p.op = OP_MAC;
    all_pe(2, p); C[2].glb.h_ld = 1; C[2].glb.v_ld = 1;
    all_pe(3, p);
    for (int c = 0; c < N; c++) begin
      C[4 + c].glb.h_st = 1;
      for (int r = 0; r < N; r++) C[4 + c].pe[r][c].st_en = 1;
    end
    write_ctx(12);
    loop_set(2, 2, 11, kd - 2);
    agu_set(0, 0, 4095, 1, 0);
    agu_set(1, 0, 4095, 1, 0);
    agu_set(2, 1000, 4095, 1, 0);
    reg_wr(4, {30'b0, set, chain});
    run(cyc);
    check_int("pwc cycles", cyc, kd + 9 + 1);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int s;
      s = 0;
      if (chain) for (int i = 0; i < kd; i++) s += int'(X[r][i]) * int'(Wm[i][c]);
      else s = int'(X[r][kd-1]) * int'(Wm[kd-1][c]);
      mem_rd(0, set, r, 1000 + c, got);
      check($sformatf("pwc kd=%0d chain=%0b y[%0d][%0d]", kd, chain, r, c), got, 16'(s));
    end
  endtask

  // ---------------- 3: depthwise convolution, stride 1 ----------------
  logic [15:0] xi [N+2][N+2];
  logic [15:0] wk [3][3];

  task automatic dwc_s1(bit via_wb, int copy);
    // snake order of the 3x3 weights and the phase of each step
    int wa [9] = '{0, 0, 0, 1, 1, 1, 2, 2, 2};
    int wb [9] = '{0, 1, 2, 2, 1, 0, 0, 1, 2};
    // phase: 0 EE, 1 SS, 2 EW
    int ph [9] = '{0, 0, 0, 1, 2, 2, 1, 0, 0};
    int hq [N][$];
    int vq [N][$];
    int e, cyc, a, b;
    logic [15:0] got;
    for (int i = 0; i < N + 2; i++) for (int j = 0; j < N + 2; j++) xi[i][j] = 16'($urandom);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) wk[i][j] = 16'($urandom);
    // weights
    if (via_wb) begin
      logic [63:0] rows [3];
      int w0;
      w0 = copy * 9;
      // rows covering words w0 .. w0+8
      for (int q = 0; q < 3; q++) rows[q] = {$urandom, $urandom};
      for (int k = 0; k < 9; k++) begin
        int w;
        w = w0 + k;
        rows[w / 4 - w0 / 4][(w % 4) * 16 +: 16] = wk[k / 3][k % 3];
      end
      for (int q = 0; q < 3; q++) begin
        host_wb_we = 1; host_wb_addr = 8'(w0 / 4 + q); host_wb_wdata = rows[q];
        @(negedge clk);
      end
      host_wb_we = 0;
      host_wb_load = 1; host_wb_copy = 6'(copy);
      @(negedge clk);
      host_wb_load = 0;
      while (wb_busy) @(negedge clk);
    end else begin
      for (int k = 0; k < 9; k++) begin
        host_grf_we = 1; host_grf_addr = 4'(k); host_grf_wdata = wk[k / 3][k % 3];
        @(negedge clk);
      end
      host_grf_we = 0;
    end
    clear_ctx();
    // prologue: execution contexts 1..N-1, PE column p+1 captures x(r,p)
    for (int p = 0; p < N - 1; p++) begin
      e = 1 + p;
      for (int r = 0; r < N; r++) begin
        hq[r].push_back(int'(xi[r][p]));
        for (int c = 0; c < N; c++) begin
          C[e].pe[r][c].sel_a = SRC_R0;
          if (c == p + 1) begin
            C[e].pe[r][c].op = OP_PASSA; C[e].pe[r][c].sel_a = SRC_HBUS;
            C[e].pe[r][c].rf_we = 1; C[e].pe[r][c].rf_waddr = 0; C[e].pe[r][c].rf_wsel = RFW_ALU;
          end else if (p == N - 2) begin
            // last prologue cycle: shift towards the west for the first EE step
            C[e].pe[r][c].rf_we = 1; C[e].pe[r][c].rf_wsel = RFW_REUSE; C[e].pe[r][c].reuse = RU_E;
          end
        end
      end
      C[e - 1].glb.h_ld = 1;
    end
    // K^2 compute steps
    for (int s = 0; s < 9; s++) begin
      e = N + s;
      a = wa[s]; b = wb[s];
      C[e].glb.grf_idx = 4'(a * 3 + b);
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        pe_cfg_t p;
        p = '0;
        p.op = (s == 0) ? OP_MUL : OP_MAC;
        p.sel_a = SRC_R0; p.sel_b = SRC_GRF;
        if (ph[s] == 0 && c == N - 1) p.sel_a = SRC_HBUS;
        if (ph[s] == 1 && r == N - 1) p.sel_a = SRC_VBUS;
        if (ph[s] == 2 && c == 0)     p.sel_a = SRC_HBUS;
        if (s < 8) begin
          p.rf_we = 1; p.rf_waddr = 0; p.rf_wsel = RFW_REUSE;
          p.reuse = (ph[s + 1] == 0) ? RU_E : (ph[s + 1] == 1) ? RU_S : RU_W;
        end
        C[e].pe[r][c] = p;
      end
      if (ph[s] == 0) begin
        C[e - 1].glb.h_ld = 1;
        for (int r = 0; r < N; r++) hq[r].push_back(int'(xi[r + a][N - 1 + b]));
      end else if (ph[s] == 2) begin
        C[e - 1].glb.h_ld = 1;
        for (int r = 0; r < N; r++) hq[r].push_back(int'(xi[r + a][b]));
      end else begin
        C[e - 1].glb.v_ld = 1;
        for (int c = 0; c < N; c++) vq[c].push_back(int'(xi[N - 1 + a][c + b]));
      end
    end
    // stores
    for (int c = 0; c < N; c++) begin
      e = N + 9 + c;
      C[e].glb.h_st = 1;
      for (int r = 0; r < N; r++) C[e].pe[r][c].st_en = 1;
    end
    write_ctx(N + 9 + N);
    // data layout: each bank holds its bus's words in consumption order
    for (int r = 0; r < N; r++) for (int k = 0; k < hq[r].size(); k++) mem_wr(0, 0, r, k, 16'(hq[r][k]));
    for (int c = 0; c < N; c++) for (int k = 0; k < vq[c].size(); k++) mem_wr(1, 0, c, k, 16'(vq[c][k]));
    check_int("dwc s1 h words per bank", hq[0].size(), 14);
    check_int("dwc s1 v words per bank", vq[0].size(), 2);
    loop_set(0, 0, N + 9 + N - 1, 1);
    agu_set(0, 0, 4095, 1, 0);
    agu_set(1, 0, 4095, 1, 0);
    agu_set(2, 1500, 4095, 1, 0);
    reg_wr(4, 1);
    run(cyc);
    // 1 load-ahead context + (N-1 + K^2) compute + N stores, done one later
    check_int("dwc s1 cycles", cyc, 1 + (N - 1 + 9) + N + 1);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int y;
      y = 0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) y += int'(wk[i][j]) * int'(xi[r + i][c + j]);
      mem_rd(0, 0, r, 1500 + c, got);
      check($sformatf("dwc s1 y[%0d][%0d]", r, c), got, 16'(y));
    end
  endtask

  // ---------------- 4: depthwise convolution, stride 2 ----------------
  logic [15:0] x2 [2*N+1][2*N+1];

  task automatic dwc_s2();
    localparam int L = 2 * (N - 1) + 3;   // 17 bus words per input row
    int cyc;
    logic [15:0] got;
    pe_cfg_t p;
    for (int i = 0; i < 2 * N + 1; i++) for (int j = 0; j < 2 * N + 1; j++) x2[i][j] = 16'($urandom);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) wk[i][j] = 16'($urandom);
    // layout: H bank r address a*L+j = x(2r+a, j); V bank c address a*L+j = w(a, j-2c)
    // (other V words are filler that a correct schedule never uses)
    for (int r = 0; r < N; r++) for (int a = 0; a < 3; a++) for (int j = 0; j < L; j++)
      mem_wr(0, 1, r, a * L + j, x2[2 * r + a][j]);
    for (int c = 0; c < N; c++) for (int a = 0; a < 3; a++) for (int j = 0; j < L; j++)
      mem_wr(1, 1, c, a * L + j, (j - 2 * c >= 0 && j - 2 * c < 3) ? wk[a][j - 2 * c] : 16'($urandom));
    clear_ctx();
    p = '0; p.op = OP_PASSB; p.sel_b = SRC_CONST; p.konst = 0;
    all_pe(0, p);
    C[0].glb.h_ld = 1; C[0].glb.v_ld = 1;
    for (int j = 0; j < L; j++) begin
      C[1 + j].glb.h_ld = 1; C[1 + j].glb.v_ld = 1;
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        p = '0; p.sel_a = SRC_HBUS; p.sel_b = SRC_VBUS;
        p.op = (j - 2 * c >= 0 && j - 2 * c < 3) ? OP_MAC : OP_NOP;
        C[1 + j].pe[r][c] = p;
      end
    end
    for (int c = 0; c < N; c++) begin
      C[1 + L + c].glb.h_st = 1;
      for (int r = 0; r < N; r++) C[1 + L + c].pe[r][c].st_en = 1;
    end
    write_ctx(1 + L + N);
    loop_set(1, L, L + N, 3);
    agu_set(0, 0, 4095, 1, 0);
    agu_set(1, 0, 4095, 1, 0);
    agu_set(2, 2000, 4095, 1, 0);
    reg_wr(4, 3);   // set 1, chained MAC
    run(cyc);
    check_int("dwc s2 cycles", cyc, 1 + 3 * L + N + 1);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int y;
      y = 0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
        y += int'(wk[i][j]) * int'(x2[2 * r + i][2 * c + j]);
      mem_rd(0, 1, r, 2000 + c, got);
      check($sformatf("dwc s2 y[%0d][%0d]", r, c), got, 16'(y));
    end
  endtask

  initial begin
    n_hld = 0; n_vld = 0; n_hst = 0; n_grf = 0; n_mac_chain = 0; n_mac_plain = 0;
    n_set1 = 0; n_wrap = 0; n_wb = 0; n_grf_host = 0;
    for (int d = 0; d < 4; d++) n_reuse[d] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    pwc(16, 0, 1);
    pwc(40, 1, 1);
    pwc(9, 0, 0);
    pwc(KMAX, 1, 1);
    dwc_s1(1, 37);
    dwc_s1(0, 0);
    dwc_s2();

    check_int("mech h-bus loads seen", int'(n_hld > 0), 1);
    check_int("mech v-bus loads seen", int'(n_vld > 0), 1);
    check_int("mech stores seen", int'(n_hst > 0), 1);
    check_int("mech reuse from east", int'(n_reuse[RU_E] > 0), 1);
    check_int("mech reuse from south", int'(n_reuse[RU_S] > 0), 1);
    check_int("mech reuse from west", int'(n_reuse[RU_W] > 0), 1);
    check_int("mech grf broadcast", int'(n_grf > 0), 1);
    check_int("mech chained mac", int'(n_mac_chain > 0), 1);
    check_int("mech unchained mac", int'(n_mac_plain > 0), 1);
    check_int("mech memory set 1", int'(n_set1 > 0), 1);
    check_int("mech loop repeat", int'(n_wrap > 0), 1);
    check_int("mech weight buffer transfer", n_wb, 9);
    check_int("mech direct grf write", n_grf_host, 9);
    $display("mechanisms: hld=%0d vld=%0d hst=%0d reuseE=%0d reuseS=%0d reuseW=%0d grf=%0d mac=%0d/%0d set1=%0d wrap=%0d wb=%0d grfhost=%0d",
             n_hld, n_vld, n_hst, n_reuse[RU_E], n_reuse[RU_S], n_reuse[RU_W], n_grf,
             n_mac_chain, n_mac_plain, n_set1, n_wrap, n_wb, n_grf_host);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
