// tb_npcgra_pe_array: self-checking test of the 8x8 PE array and its networks.
//  1. Output-stationary matrix multiplication (Fig. 1 style): H-bus r carries
//     X(r,i), V-bus c carries W(i,c); every PE does one MAC per cycle, so an
//     8x8 result tile with inner size 9 takes 9 cycles. Each Out is compared
//     with the product computed here.
//  2. Store collection: with one st_en per row/column the row and column
//     store words are the selected PEs' Out.
//  3. Operand reuse network: every PE reads its own bus operand (OpA) while
//     writing a neighbour's OpA into R0, for each of the four directions;
//     the R0 contents (zero beyond the edge) are checked via PASSA.
//  4. Mesh output network: PASSA from a neighbour's Out.
module tb_npcgra_pe_array;
  import npcgra_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  pe_cfg_t cfg [N][N];
  logic [15:0] hbus [N];
  logic [15:0] vbus [N];
  logic [15:0] grf = 0;
  logic [15:0] pe_out [N][N];
  logic [15:0] h_st [N];
  logic [15:0] v_st [N];
  int checks = 0, failures = 0;

  npcgra_pe_array dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .mac_chain(1'b1), .hbus(hbus),
    .vbus(vbus), .grf(grf), .pe_out(pe_out), .h_st_data(h_st), .v_st_data(v_st));

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic all_cfg(pe_cfg_t c);
    for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) cfg[r][k] = c;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] X [N][9];
  logic [15:0] Wt [9][N];
  logic [15:0] hv [N][N];

  initial begin
    pe_cfg_t c;
    int cycles;
    logic [15:0] exp;
    c = '0; all_cfg(c);
    for (int r = 0; r < N; r++) begin hbus[r] = 0; vbus[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    // 1. matrix multiplication tile
    for (int r = 0; r < N; r++) for (int i = 0; i < 9; i++) X[r][i] = 16'($urandom_range(0, 999));
    for (int i = 0; i < 9; i++) for (int k = 0; k < N; k++) Wt[i][k] = 16'($urandom_range(0, 999));
    cycles = 0;
    for (int i = 0; i < 9; i++) begin
      c = '0; c.sel_a = SRC_HBUS; c.sel_b = SRC_VBUS; c.op = (i == 0) ? OP_MUL : OP_MAC;
      all_cfg(c);
      for (int r = 0; r < N; r++) hbus[r] = X[r][i];
      for (int k = 0; k < N; k++) vbus[k] = Wt[i][k];
      @(negedge clk);
      cycles++;
    end
    c = '0; all_cfg(c);
    for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) begin
      int s;
      s = 0;
      for (int i = 0; i < 9; i++) s += int'(X[r][i]) * int'(Wt[i][k]);
      check($sformatf("matmul y[%0d][%0d]", r, k), pe_out[r][k], 16'(s));
    end
    checks++; if (cycles != 9) failures++;

    // 2. store collection: row r stores column (r+1)%N, column k stores row k
    for (int r = 0; r < N; r++) cfg[r][(r + 1) % N].st_en = 1;
    #1;
    for (int r = 0; r < N; r++) check("h_st", h_st[r], pe_out[r][(r + 1) % N]);
    for (int k = 0; k < N; k++) check("v_st", v_st[k], pe_out[(k + N - 1) % N][k]);
    c = '0; all_cfg(c);

    // 3. operand reuse network, each direction
    for (int d = 0; d < 4; d++) begin
      for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) hv[r][k] = 16'($urandom);
      for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) begin
        cfg[r][k] = '0;
        cfg[r][k].op = OP_PASSB; cfg[r][k].sel_b = SRC_CONST; cfg[r][k].konst = hv[r][k];
      end
      @(negedge clk);
      // put each PE's own value in R3 via the ALU, then present it as OpA
      for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) begin
        cfg[r][k] = '0; cfg[r][k].op = OP_PASSA; cfg[r][k].sel_a = SRC_SELF;
        cfg[r][k].rf_we = 1; cfg[r][k].rf_waddr = 3; cfg[r][k].rf_wsel = RFW_ALU;
      end
      @(negedge clk);
      for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) begin
        cfg[r][k] = '0; cfg[r][k].op = OP_NOP; cfg[r][k].sel_a = SRC_R3;
        cfg[r][k].rf_we = 1; cfg[r][k].rf_waddr = 0; cfg[r][k].rf_wsel = RFW_REUSE;
        cfg[r][k].reuse = dir_e'(d);
      end
      @(negedge clk);
      for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) begin
        cfg[r][k] = '0; cfg[r][k].op = OP_PASSA; cfg[r][k].sel_a = SRC_R0;
      end
      @(negedge clk);
      for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) begin
        case (d)
          0: exp = (r > 0)     ? hv[r-1][k] : 0;
          1: exp = (r < N - 1) ? hv[r+1][k] : 0;
          2: exp = (k < N - 1) ? hv[r][k+1] : 0;
          default: exp = (k > 0) ? hv[r][k-1] : 0;
        endcase
        check($sformatf("reuse d%0d [%0d][%0d]", d, r, k), pe_out[r][k], exp);
      end
    end

    // 4. mesh: every PE takes its west neighbour's Out
    for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) hv[r][k] = pe_out[r][k];
    for (int r = 0; r < N; r++) for (int k = 0; k < N; k++) begin
      cfg[r][k] = '0; cfg[r][k].op = OP_PASSA; cfg[r][k].sel_a = SRC_W;
    end
    @(negedge clk);
    for (int r = 0; r < N; r++) for (int k = 0; k < N; k++)
      check("mesh W", pe_out[r][k], (k > 0) ? hv[r][k-1] : 16'h0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
