// npcgra_top: NP-CGRA, a CGRA extended for depthwise separable convolution.
//
// An 8x8 array of 16-bit PEs runs one context word per cycle from a 32-entry
// configuration memory, sequenced by the controller as prologue / repeated
// loop body / epilogue. Operands reach the array over crossbar-style memory
// busses: H-MEM bank r drives the H-bus of PE row r and V-MEM bank c the V-bus
// of PE column c, each with a streamed-load AGU, so a single memory read feeds
// a whole row or column. Results are written back through a store AGU per
// side, from the PE of each row (column) selected by its st_en bit. A global
// register file (GRF), loaded from the Weight Buffer or directly by the host,
// broadcasts one weight to every PE at the index given in the context word.
// PEs have dual-mode MAC (mode bit, fixed per application) and the operand
// reuse network. Each H-MEM and V-MEM has two sets; the array uses the set in
// the mode register while DMA fills the other.
//
// Host / DMA interface (this design's own; the architecture leaves DMA and
// host control unspecified):
//   host_cfg_*  write 32-bit slice host_cfg_slice of context host_cfg_addr
//   host_reg_*  write registers:
//       0 loop_start   1 loop_end   2 last_pc   3 loop_cnt
//       4 mode: bit0 mac_chain, bit1 array set of H-MEM/V-MEM
//       5..8   H-load AGU  base, n0, s0, s1
//       9..12  V-load AGU  base, n0, s0, s1
//       13..16 H-store AGU base, n0, s0, s1
//       17..20 V-store AGU base, n0, s0, s1
//   host_mem_*  one word per cycle into/out of H-MEM (vsel=0) or V-MEM (vsel=1),
//               read data one cycle later
//   host_wb_*   Weight Buffer row write, and load of copy host_wb_copy into
//               the GRF (wb_busy while it runs)
//   host_grf_*  direct GRF write (not while wb_busy)
//   start/busy/done  run the programmed kernel; done pulses after the last
//               context has executed.
// Timing of a kernel: context k is issued in cycle t and executes in t+1. A
// context with h_ld (v_ld) reads the next AGU address; the word is on the
// busses in the following cycle, where the next context uses it. A context
// with h_st (v_st) writes the current Out of the selected PEs.
module npcgra_top
  import npcgra_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 2496,  // words per bank per set (39 KB per set)
  parameter int unsigned CTX_DEPTH = 32,
  parameter int unsigned WB_DEPTH  = 144,
  parameter int unsigned AW        = $clog2(MEM_DEPTH),
  parameter int unsigned PCW       = $clog2(CTX_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // run control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // configuration memory
  input  logic                 host_cfg_we,
  input  logic [PCW-1:0]       host_cfg_addr,
  input  logic [6:0]           host_cfg_slice,
  input  logic [31:0]          host_cfg_wdata,
  // registers
  input  logic                 host_reg_we,
  input  logic [4:0]           host_reg_addr,
  input  logic [31:0]          host_reg_wdata,
  // local memories
  input  logic                 host_mem_en,
  input  logic                 host_mem_we,
  input  logic                 host_mem_vsel,
  input  logic                 host_mem_set,
  input  logic [2:0]           host_mem_bank,
  input  logic [AW-1:0]        host_mem_addr,
  input  logic [DATA_W-1:0]    host_mem_wdata,
  output logic [DATA_W-1:0]    host_mem_rdata,
  // weight buffer and GRF
  input  logic                 host_wb_we,
  input  logic [$clog2(WB_DEPTH)-1:0] host_wb_addr,
  input  logic [63:0]          host_wb_wdata,
  input  logic                 host_wb_load,
  input  logic [5:0]           host_wb_copy,
  output logic                 wb_busy,
  input  logic                 host_grf_we,
  input  logic [GRF_IW-1:0]    host_grf_addr,
  input  logic [DATA_W-1:0]    host_grf_wdata
);

  // ---------------- registers ----------------
  typedef struct packed {
    logic [AW-1:0] base;
    logic [AW-1:0] n0;
    logic [AW-1:0] s0;
    logic [AW-1:0] s1;
  } agu_cfg_t;

  logic [PCW-1:0] loop_start, loop_end, last_pc;
  logic [15:0]    loop_cnt;
  logic           mac_chain, arr_set;
  agu_cfg_t       agu_cfg [4];   // 0 H-load, 1 V-load, 2 H-store, 3 V-store
  logic [4:0]     agu_reg;       // AGU register offset: {agu[1:0], field[1:0]}

  assign agu_reg = host_reg_addr - 5'd5;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loop_start <= '0;
      loop_end   <= '0;
      last_pc    <= '0;
      loop_cnt   <= 16'd1;
      mac_chain  <= 1'b1;
      arr_set    <= 1'b0;
      for (int i = 0; i < 4; i++) agu_cfg[i] <= '0;
    end else if (host_reg_we) begin
      unique case (host_reg_addr)
        5'd0: loop_start <= host_reg_wdata[PCW-1:0];
        5'd1: loop_end   <= host_reg_wdata[PCW-1:0];
        5'd2: last_pc    <= host_reg_wdata[PCW-1:0];
        5'd3: loop_cnt   <= host_reg_wdata[15:0];
        5'd4: {arr_set, mac_chain} <= host_reg_wdata[1:0];
        default:
          if (host_reg_addr >= 5'd5 && host_reg_addr <= 5'd20) begin
            unique case (agu_reg[1:0])
              2'd0: agu_cfg[agu_reg[3:2]].base <= host_reg_wdata[AW-1:0];
              2'd1: agu_cfg[agu_reg[3:2]].n0   <= host_reg_wdata[AW-1:0];
              2'd2: agu_cfg[agu_reg[3:2]].s0   <= host_reg_wdata[AW-1:0];
              default: agu_cfg[agu_reg[3:2]].s1 <= host_reg_wdata[AW-1:0];
            endcase
          end
      endcase
    end
  end

  // ---------------- controller and configuration ----------------
  logic           cfg_rd, ctx_valid, agu_restart;
  logic [PCW-1:0] cfg_addr;
  logic [CTX_W-1:0] ctx_bits;
  ctx_t           ctx;

  npcgra_controller #(.PCW(PCW), .LCW(16)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .loop_start (loop_start),
    .loop_end   (loop_end),
    .last_pc    (last_pc),
    .loop_cnt   (loop_cnt),
    .cfg_rd     (cfg_rd),
    .cfg_addr   (cfg_addr),
    .ctx_valid  (ctx_valid),
    .agu_restart(agu_restart),
    .busy       (busy),
    .done       (done)
  );

  npcgra_config_mem #(.DEPTH(CTX_DEPTH), .CW(CTX_W)) u_cfgmem (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (host_cfg_we),
    .wr_addr (host_cfg_addr),
    .wr_slice(host_cfg_slice),
    .wr_data (host_cfg_wdata),
    .rd_en   (cfg_rd),
    .rd_addr (cfg_addr),
    .ctx     (ctx_bits)
  );

  assign ctx = ctx_t'(ctx_bits);

  glb_cfg_t glb;
  assign glb = ctx_valid ? ctx.glb : '0;

  // ---------------- AGUs ----------------
  logic [AW-1:0] agu_addr [4];
  logic          agu_step [4];

  assign agu_step[0] = glb.h_ld;
  assign agu_step[1] = glb.v_ld;
  assign agu_step[2] = glb.h_st;
  assign agu_step[3] = glb.v_st;

  for (genvar i = 0; i < 4; i++) begin : g_agu
    npcgra_agu #(.AW(AW), .CW(AW)) u_agu (
      .clk    (clk),
      .rst_n  (rst_n),
      .base   (agu_cfg[i].base),
      .n0     (agu_cfg[i].n0),
      .s0     (agu_cfg[i].s0),
      .s1     (agu_cfg[i].s1),
      .restart(agu_restart),
      .step   (agu_step[i]),
      .addr   (agu_addr[i])
    );
  end

  // ---------------- GRF and Weight Buffer ----------------
  logic              wb_grf_we;
  logic [GRF_IW-1:0] wb_grf_waddr;
  logic [DATA_W-1:0] wb_grf_wdata, grf_rdata;

  npcgra_weight_buffer #(.DEPTH(WB_DEPTH), .WIDTH(64), .COPIES(64)) u_wb (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (host_wb_we),
    .wr_addr  (host_wb_addr),
    .wr_data  (host_wb_wdata),
    .load     (host_wb_load),
    .copy     (host_wb_copy),
    .busy     (wb_busy),
    .grf_we   (wb_grf_we),
    .grf_waddr(wb_grf_waddr),
    .grf_wdata(wb_grf_wdata)
  );

  npcgra_grf u_grf (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (wb_grf_we | host_grf_we),
    .waddr(wb_grf_we ? wb_grf_waddr : host_grf_addr),
    .wdata(wb_grf_we ? wb_grf_wdata : host_grf_wdata),
    .ridx (glb.grf_idx),
    .rdata(grf_rdata)
  );

  // ---------------- local memories and busses ----------------
  logic [DATA_W-1:0] hbus [NR];
  logic [DATA_W-1:0] vbus [NC];
  logic [DATA_W-1:0] h_st_data [NR];
  logic [DATA_W-1:0] v_st_data [NC];
  logic [DATA_W-1:0] h_host_rdata, v_host_rdata;
  logic              host_vsel_q;

  npcgra_local_mem #(.NBANK(NR), .DEPTH(MEM_DEPTH), .SETS(2)) u_hmem (
    .clk       (clk),
    .rst_n     (rst_n),
    .arr_set   (arr_set),
    .arr_rd    (glb.h_ld),
    .arr_raddr (agu_addr[0]),
    .arr_rdata (hbus),
    .arr_wr    (glb.h_st),
    .arr_waddr (agu_addr[2]),
    .arr_wdata (h_st_data),
    .host_en   (host_mem_en && !host_mem_vsel),
    .host_we   (host_mem_we),
    .host_set  (host_mem_set),
    .host_bank (host_mem_bank),
    .host_addr (host_mem_addr),
    .host_wdata(host_mem_wdata),
    .host_rdata(h_host_rdata)
  );

  npcgra_local_mem #(.NBANK(NC), .DEPTH(MEM_DEPTH), .SETS(2)) u_vmem (
    .clk       (clk),
    .rst_n     (rst_n),
    .arr_set   (arr_set),
    .arr_rd    (glb.v_ld),
    .arr_raddr (agu_addr[1]),
    .arr_rdata (vbus),
    .arr_wr    (glb.v_st),
    .arr_waddr (agu_addr[3]),
    .arr_wdata (v_st_data),
    .host_en   (host_mem_en && host_mem_vsel),
    .host_we   (host_mem_we),
    .host_set  (host_mem_set),
    .host_bank (host_mem_bank),
    .host_addr (host_mem_addr),
    .host_wdata(host_mem_wdata),
    .host_rdata(v_host_rdata)
  );

  always_ff @(posedge clk) begin
    if (host_mem_en && !host_mem_we) host_vsel_q <= host_mem_vsel;
  end
  assign host_mem_rdata = host_vsel_q ? v_host_rdata : h_host_rdata;

  // ---------------- PE array ----------------
  pe_cfg_t           pe_cfg [NR][NC];
  logic [DATA_W-1:0] pe_out [NR][NC];

  always_comb begin
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++)
        pe_cfg[r][c] = ctx_valid ? ctx.pe[r][c] : '0;
  end

  npcgra_pe_array u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg      (pe_cfg),
    .mac_chain(mac_chain),
    .hbus     (hbus),
    .vbus     (vbus),
    .grf      (grf_rdata),
    .pe_out   (pe_out),
    .h_st_data(h_st_data),
    .v_st_data(v_st_data)
  );

  // The GRF has one write port: direct host writes must not overlap a
  // Weight Buffer transfer.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(host_grf_we && wb_grf_we))
      else $error("GRF write port conflict");
  end

endmodule
