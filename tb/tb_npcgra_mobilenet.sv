// tb_npcgra_mobilenet: workload test running the first depthwise separable
// block of MobileNet V1 (width 1.0, 224x224 input) on the full-size design:
//   DWC1: 3x3 depthwise, stride 1, 112x112x32 -> 112x112x32 (zero padding 1)
//   PWC1: 1x1 pointwise, 112x112x32 -> 112x112x64
//   DWC2: 3x3 depthwise, stride 2, 112x112x64 -> 56x56x64 (zero padding 1)
// Each layer's context program is written once; the layer then runs as a
// sequence of 8x8 output tiles. The host plays the role of the DMA: while the
// array works on one memory set it reads back the previous tile's results and
// writes the next tile's data into the other set (double buffering). DWC
// weights of all channels sit in the Weight Buffer and are moved into the GRF
// once per channel; PWC weights stay in V-MEM and each output-channel group is
// selected by the V-load AGU base; stride-2 weights are rewritten per channel. Every output is compared with a reference
// computed here with the same 16-bit wrap-around arithmetic, and every kernel's
// cycle count is checked. HW, C0 and C1 set the layer size.
module tb_npcgra_mobilenet;
  import npcgra_pkg::*;

  localparam int N   = 8;
  localparam int HW  = 112;          // DWC1/PWC1 spatial size
  localparam int C0  = 32;           // input channels
  localparam int C1  = 64;           // PWC output channels
  localparam int HO  = HW / 2;       // DWC2 output size
  localparam int NSL = (CTX_W + 31) / 32;
  localparam int L2  = 2 * (N - 1) + 3;   // stride-2 bus words per input row
  localparam int ST  = 2400;              // store base address

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
  // loop bounds kept in variables so that the simulator does not unroll loops
  int nv = N, c0v = C0, c1v = C1, l2v = L2, nslv = NSL;
  int k2 = 2, k3 = 3, k4 = 4, k9 = 9, k32 = 32;
  longint cyc_now = 0;
  always @(posedge clk) cyc_now++;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // overlap of host traffic with a running kernel (double buffering)
  longint n_overlap = 0, n_mac = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy && host_mem_en) n_overlap++;
    for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++)
      if (dut.pe_cfg[r][c].op == OP_MAC || dut.pe_cfg[r][c].op == OP_MUL) n_mac++;
  end

  // ---------------- tensors ----------------
  logic [15:0] a0  [C0][HW][HW];
  logic [15:0] d1  [C0][HW][HW];
  logic [15:0] p1  [C1][HW][HW];
  logic [15:0] d2  [C1][HO][HO];
  logic [15:0] wd1 [C0][3][3];
  logic [15:0] wpw [C0][C1];
  logic [15:0] wd2 [C1][3][3];

  function automatic logic [15:0] a0p(int ch, int y, int x);
    return (y < 0 || x < 0 || y >= HW || x >= HW) ? 16'h0 : a0[ch][y][x];
  endfunction
  function automatic logic [15:0] p1p(int ch, int y, int x);
    return (y < 0 || x < 0 || y >= HW || x >= HW) ? 16'h0 : p1[ch][y][x];
  endfunction

  // ---------------- host helpers ----------------
  ctx_t C [32];

  task automatic write_ctx(int n);
    logic [NSL*32-1:0] padded;
    for (int k = 0; k < n; k++) begin
      padded = (NSL*32)'(C[k]);
      for (int s = 0; s < nslv; s++) begin
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

  // run the loaded program on memory set `set`; check its length
  task automatic run(bit set, int exp_cycles);
    longint t0;
    reg_wr(4, {30'b0, set, 1'b1});
    t0 = cyc_now;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (int'(cyc_now - t0) != exp_cycles) begin
      failures++;
      if (failures < 20) $display("FAIL kernel took %0d cycles, expected %0d", cyc_now - t0, exp_cycles);
    end
  endtask

  task automatic all_pe(int k, pe_cfg_t p);
    for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++) C[k].pe[r][c] = p;
  endtask

  task automatic store_ctx(int first);
    for (int c = 0; c < nv; c++) begin
      C[first + c].glb.h_st = 1;
      for (int r = 0; r < nv; r++) C[first + c].pe[r][c].st_en = 1;
    end
  endtask

  task automatic check_word(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // ---------------- DWC stride 1 ----------------
  int wa [9] = '{0, 0, 0, 1, 1, 1, 2, 2, 2};
  int wb [9] = '{0, 1, 2, 2, 1, 0, 0, 1, 2};
  int ph [9] = '{0, 0, 0, 1, 2, 2, 1, 0, 0};   // 0 EE, 1 SS, 2 EW

  task automatic prog_dwc_s1();
    int e;
    for (int k = 0; k < k32; k++) C[k] = '0;
    for (int p = 0; p < nv - 1; p++) begin
      e = 1 + p;
      for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++) begin
        C[e].pe[r][c].sel_a = SRC_R0;
        if (c == p + 1) begin
          C[e].pe[r][c].op = OP_PASSA; C[e].pe[r][c].sel_a = SRC_HBUS;
          C[e].pe[r][c].rf_we = 1; C[e].pe[r][c].rf_wsel = RFW_ALU;
        end else if (p == N - 2) begin
          C[e].pe[r][c].rf_we = 1; C[e].pe[r][c].rf_wsel = RFW_REUSE; C[e].pe[r][c].reuse = RU_E;
        end
      end
      C[e - 1].glb.h_ld = 1;
    end
    for (int s = 0; s < k9; s++) begin
      e = N + s;
      C[e].glb.grf_idx = 4'(wa[s] * 3 + wb[s]);
      for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++) begin
        pe_cfg_t p;
        p = '0;
        p.op = (s == 0) ? OP_MUL : OP_MAC;
        p.sel_a = SRC_R0; p.sel_b = SRC_GRF;
        if (ph[s] == 0 && c == N - 1) p.sel_a = SRC_HBUS;
        if (ph[s] == 1 && r == N - 1) p.sel_a = SRC_VBUS;
        if (ph[s] == 2 && c == 0)     p.sel_a = SRC_HBUS;
        if (s < 8) begin
          p.rf_we = 1; p.rf_wsel = RFW_REUSE;
          p.reuse = (ph[s + 1] == 0) ? RU_E : (ph[s + 1] == 1) ? RU_S : RU_W;
        end
        C[e].pe[r][c] = p;
      end
      if (ph[s] == 1) C[e - 1].glb.v_ld = 1; else C[e - 1].glb.h_ld = 1;
    end
    store_ctx(N + 9);
    write_ctx(N + 9 + N);
    loop_set(0, 0, N + 9 + N - 1, 1);
    agu_set(0, 0, 4095, 1, 0);
    agu_set(1, 0, 4095, 1, 0);
    agu_set(2, ST, 4095, 1, 0);
  endtask

  // data layout of one stride-1 tile (channel ch, tile origin oy, ox)
  task automatic load_dwc_s1(bit set, int ch, int oy, int ox);
    int k;
    for (int r = 0; r < nv; r++) begin
      k = 0;
      for (int p = 0; p < nv - 1; p++) begin mem_wr(0, set, r, k, a0p(ch, oy + r - 1, ox + p - 1)); k++; end
      for (int s = 0; s < k9; s++) begin
        if (ph[s] == 0) begin mem_wr(0, set, r, k, a0p(ch, oy + r + wa[s] - 1, ox + N - 1 + wb[s] - 1)); k++; end
        if (ph[s] == 2) begin mem_wr(0, set, r, k, a0p(ch, oy + r + wa[s] - 1, ox + wb[s] - 1)); k++; end
      end
    end
    for (int c = 0; c < nv; c++) begin
      k = 0;
      for (int s = 0; s < k9; s++) if (ph[s] == 1) begin
        mem_wr(1, set, c, k, a0p(ch, oy + N - 1 + wa[s] - 1, ox + c + wb[s] - 1)); k++;
      end
    end
  endtask

  task automatic read_tile(bit set, int base, output logic [15:0] t [N][N]);
    for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++) mem_rd(0, set, r, base + c, t[r][c]);
  endtask

  task automatic layer_dwc1();
    int nt, total;
    int tch [$], ty [$], tx [$];
    logic [15:0] t [N][N];
    // all channel weights into the Weight Buffer: copy ch = words 9ch..9ch+8
    for (int row = 0; row < (C0 * 9 + 3) / 4; row++) begin
      logic [63:0] d;
      d = '0;
      for (int l = 0; l < k4; l++) if (row * 4 + l < C0 * 9) begin
        int w;
        w = row * 4 + l;
        d[l * 16 +: 16] = wd1[w / 9][(w % 9) / 3][w % 3];
      end
      host_wb_we = 1; host_wb_addr = 8'(row); host_wb_wdata = d;
      @(negedge clk);
    end
    host_wb_we = 0;
    prog_dwc_s1();
    for (int ch = 0; ch < c0v; ch++) for (int y = 0; y < HW; y += N) for (int x = 0; x < HW; x += N) begin
      tch.push_back(ch); ty.push_back(y); tx.push_back(x);
    end
    total = tch.size();
    load_dwc_s1(0, tch[0], ty[0], tx[0]);
    for (nt = 0; nt < total; nt++) begin
      if (nt == 0 || tch[nt] != tch[nt - 1]) begin
        host_wb_load = 1; host_wb_copy = 6'(tch[nt]);
        @(negedge clk);
        host_wb_load = 0;
        while (wb_busy) @(negedge clk);
      end
      fork
        run(1'(nt % 2), 1 + (N - 1 + 9) + N + 1);
        begin
          if (nt > 0) begin
            read_tile(1'((nt - 1) % 2), ST, t);
            for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++)
              d1[tch[nt - 1]][ty[nt - 1] + r][tx[nt - 1] + c] = t[r][c];
          end
          if (nt + 1 < total) load_dwc_s1(1'((nt + 1) % 2), tch[nt + 1], ty[nt + 1], tx[nt + 1]);
        end
      join
    end
    read_tile(1'((total - 1) % 2), ST, t);
    for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++)
      d1[tch[total - 1]][ty[total - 1] + r][tx[total - 1] + c] = t[r][c];
    // compare
    for (int ch = 0; ch < c0v; ch++) for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) begin
      int s;
      s = 0;
      for (int i = 0; i < k3; i++) for (int j = 0; j < k3; j++)
        s += int'(wd1[ch][i][j]) * int'(a0p(ch, y + i - 1, x + j - 1));
      check_word($sformatf("dwc1 [%0d][%0d][%0d]", ch, y, x), d1[ch][y][x], 16'(s));
    end
    $display("DWC1 done: %0d tiles", total);
  endtask

  // ---------------- PWC ----------------
  task automatic layer_pwc();
    pe_cfg_t p;
    int total;
    logic [15:0] t [N][N];
    for (int k = 0; k < k32; k++) C[k] = '0;
    C[0].glb.h_ld = 1; C[0].glb.v_ld = 1;
    p = '0; p.sel_a = SRC_HBUS; p.sel_b = SRC_VBUS; p.op = OP_MUL;
    all_pe(1, p); C[1].glb.h_ld = 1; C[1].glb.v_ld = 1;
    p.op = OP_MAC;
    all_pe(2, p); C[2].glb.h_ld = 1; C[2].glb.v_ld = 1;
    all_pe(3, p);
    store_ctx(4);
    write_ctx(12);
    loop_set(2, 2, 11, C0 - 2);
    agu_set(0, 0, 4095, 1, 0);
    // weights: V bank c, address g*C0 + i = W[i][8g + c], both sets
    for (int s = 0; s < k2; s++) for (int c = 0; c < nv; c++) for (int g = 0; g < c1v / nv; g++)
      for (int i = 0; i < c0v; i++) mem_wr(1, 1'(s), c, g * C0 + i, wpw[i][g * N + c]);
    // pixel block m: 8 consecutive pixels of the row-major 112x112 image;
    // H bank r, address i = d1[i][pixel 8m + r]
    total = HW * HW / N;
    for (int r = 0; r < nv; r++) for (int i = 0; i < c0v; i++)
      mem_wr(0, 0, r, i, d1[i][r / HW][r % HW]);
    for (int m = 0; m < total; m++) begin
      fork
        for (int g = 0; g < c1v / nv; g++) begin
          agu_set(1, g * C0, 4095, 1, 0);
          agu_set(2, ST + g * N, 4095, 1, 0);
          run(1'(m % 2), C0 + 9 + 1);
        end
        begin
          if (m > 0) begin
            for (int g = 0; g < c1v / nv; g++) begin
              read_tile(1'((m - 1) % 2), ST + g * N, t);
              for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++) begin
                int px;
                px = (m - 1) * N + r;
                p1[g * N + c][px / HW][px % HW] = t[r][c];
              end
            end
          end
          if (m + 1 < total) for (int r = 0; r < nv; r++) for (int i = 0; i < c0v; i++) begin
            int px;
            px = (m + 1) * N + r;
            mem_wr(0, 1'((m + 1) % 2), r, i, d1[i][px / HW][px % HW]);
          end
        end
      join
    end
    for (int g = 0; g < c1v / nv; g++) begin
      read_tile(1'((total - 1) % 2), ST + g * N, t);
      for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++) begin
        int px;
        px = (total - 1) * N + r;
        p1[g * N + c][px / HW][px % HW] = t[r][c];
      end
    end
    for (int o = 0; o < c1v; o++) for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) begin
      int s;
      s = 0;
      for (int i = 0; i < c0v; i++) s += int'(d1[i][y][x]) * int'(wpw[i][o]);
      check_word($sformatf("pwc [%0d][%0d][%0d]", o, y, x), p1[o][y][x], 16'(s));
    end
    $display("PWC1 done: %0d pixel blocks x %0d channel groups", total, C1 / N);
  endtask

  // ---------------- DWC stride 2 ----------------
  task automatic layer_dwc2();
    pe_cfg_t p;
    int total;
    int tch [$], ty [$], tx [$];
    logic [15:0] t [N][N];
    for (int k = 0; k < k32; k++) C[k] = '0;
    p = '0; p.op = OP_PASSB; p.sel_b = SRC_CONST;
    all_pe(0, p);
    C[0].glb.h_ld = 1; C[0].glb.v_ld = 1;
    for (int j = 0; j < l2v; j++) begin
      C[1 + j].glb.h_ld = 1; C[1 + j].glb.v_ld = 1;
      for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++) begin
        p = '0; p.sel_a = SRC_HBUS; p.sel_b = SRC_VBUS;
        p.op = (j - 2 * c >= 0 && j - 2 * c < 3) ? OP_MAC : OP_NOP;
        C[1 + j].pe[r][c] = p;
      end
    end
    store_ctx(1 + L2);
    write_ctx(1 + L2 + N);
    loop_set(1, L2, L2 + N, 3);
    agu_set(0, 0, 4095, 1, 0);
    agu_set(2, ST, 4095, 1, 0);
    for (int ch = 0; ch < c1v; ch++) for (int y = 0; y < HO; y += N) for (int x = 0; x < HO; x += N) begin
      tch.push_back(ch); ty.push_back(y); tx.push_back(x);
    end
    total = tch.size();
    load_dwc_s2(0, tch[0], ty[0], tx[0]);
    agu_set(1, 0, 4095, 1, 0);
    for (int nt = 0; nt < total; nt++) begin
      // a new channel's weights go into both sets while the array is idle
      // (64 channels x 51 words would not fit one 2496-word bank)
      if (nt == 0 || tch[nt] != tch[nt - 1])
        for (int st = 0; st < k2; st++) for (int c = 0; c < nv; c++)
          for (int a = 0; a < k3; a++) for (int j = 0; j < l2v; j++)
            mem_wr(1, 1'(st), c, a * L2 + j,
                   (j - 2 * c >= 0 && j - 2 * c < 3) ? wd2[tch[nt]][a][j - 2 * c] : 16'h0);
      fork
        run(1'(nt % 2), 1 + 3 * L2 + N + 1);
        begin
          if (nt > 0) begin
            read_tile(1'((nt - 1) % 2), ST, t);
            for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++)
              d2[tch[nt - 1]][ty[nt - 1] + r][tx[nt - 1] + c] = t[r][c];
          end
          if (nt + 1 < total) load_dwc_s2(1'((nt + 1) % 2), tch[nt + 1], ty[nt + 1], tx[nt + 1]);
        end
      join
    end
    read_tile(1'((total - 1) % 2), ST, t);
    for (int r = 0; r < nv; r++) for (int c = 0; c < nv; c++)
      d2[tch[total - 1]][ty[total - 1] + r][tx[total - 1] + c] = t[r][c];
    for (int ch = 0; ch < c1v; ch++) for (int y = 0; y < HO; y++) for (int x = 0; x < HO; x++) begin
      int s;
      s = 0;
      for (int i = 0; i < k3; i++) for (int j = 0; j < k3; j++)
        s += int'(wd2[ch][i][j]) * int'(p1p(ch, 2 * y + i - 1, 2 * x + j - 1));
      check_word($sformatf("dwc2 [%0d][%0d][%0d]", ch, y, x), d2[ch][y][x], 16'(s));
    end
    $display("DWC2 done: %0d tiles", total);
  endtask

  // H bank r, address a*L2 + j = padded p1(ch, 2(oy+r)+a-1, 2ox+j-1)
  task automatic load_dwc_s2(bit set, int ch, int oy, int ox);
    for (int r = 0; r < nv; r++) for (int a = 0; a < k3; a++) for (int j = 0; j < l2v; j++)
      mem_wr(0, set, r, a * L2 + j, p1p(ch, 2 * (oy + r) + a - 1, 2 * ox + j - 1));
  endtask

  initial begin
    longint t_start;
    for (int ch = 0; ch < c0v; ch++) for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++)
      a0[ch][y][x] = 16'($urandom);
    for (int ch = 0; ch < c0v; ch++) for (int i = 0; i < k3; i++) for (int j = 0; j < k3; j++)
      wd1[ch][i][j] = 16'($urandom);
    for (int i = 0; i < c0v; i++) for (int o = 0; o < c1v; o++) wpw[i][o] = 16'($urandom);
    for (int ch = 0; ch < c1v; ch++) for (int i = 0; i < k3; i++) for (int j = 0; j < k3; j++)
      wd2[ch][i][j] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    t_start = cyc_now;
    layer_dwc1();
    layer_pwc();
    layer_dwc2();
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL no host transfer overlapped a kernel"); end
    $display("total %0d cycles, %0d PE MAC/MUL operations, host transfers during kernels %0d cycles",
             cyc_now - t_start, n_mac, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
