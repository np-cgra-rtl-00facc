// npcgra_pkg: constants and configuration types shared by the NP-CGRA modules.
//
// NP-CGRA is an 8x8 coarse-grained reconfigurable array with 16-bit words. Each
// cycle the controller presents one context word to the array: 36 bits per PE
// plus 8 global bits, 2312 bits in all (36 x 64 + 8), as the architecture
// specifies. The split of the 36 PE bits into fields, the opcode list and the
// encodings below are this design's own choices; the array size, word size,
// per-PE and global bit counts, and the set of MUX sources (taken from the PE
// diagram) follow the architecture description.
package npcgra_pkg;

  localparam int unsigned NR        = 8;   // PE rows
  localparam int unsigned NC        = 8;   // PE columns
  localparam int unsigned DATA_W    = 16;  // word size
  localparam int unsigned GRF_N     = 9;   // GRF entries (one 3x3 DWC kernel)
  localparam int unsigned GRF_IW    = 4;   // GRF index width
  localparam int unsigned PE_CFG_W  = 36;
  localparam int unsigned GLB_CFG_W = 8;
  localparam int unsigned CTX_W     = PE_CFG_W * NR * NC + GLB_CFG_W;  // 2312

  typedef logic [DATA_W-1:0] word_t;

  // Arithmetic operations of the MULT+ALU unit.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,   // Output REG holds its value
    OP_ADD   = 4'd1,
    OP_SUB   = 4'd2,
    OP_MUL   = 4'd3,
    OP_MAC   = 4'd4,   // Out + A*B when chaining is enabled, else A*B
    OP_AND   = 4'd5,
    OP_OR    = 4'd6,
    OP_XOR   = 4'd7,
    OP_SLL   = 4'd8,
    OP_SRA   = 4'd9,
    OP_MAX   = 4'd10,  // signed
    OP_MIN   = 4'd11,  // signed
    OP_PASSA = 4'd12,
    OP_PASSB = 4'd13
  } op_e;

  // Operand MUX sources. MUX A accepts SRC_N .. SRC_VBUS; MUX B accepts all.
  typedef enum logic [3:0] {
    SRC_N    = 4'd0,   // north PE Out
    SRC_S    = 4'd1,
    SRC_E    = 4'd2,
    SRC_W    = 4'd3,
    SRC_SELF = 4'd4,   // own Output REG
    SRC_R0   = 4'd5,
    SRC_R1   = 4'd6,
    SRC_R2   = 4'd7,
    SRC_R3   = 4'd8,
    SRC_HBUS = 4'd9,   // horizontal (row) bus
    SRC_VBUS = 4'd10,  // vertical (column) bus
    SRC_CONST= 4'd11,  // MUX B only
    SRC_GRF  = 4'd12   // MUX B only
  } src_e;

  // Operand reuse MUX: which neighbour's OpA is offered to the register file.
  typedef enum logic [1:0] {
    RU_N = 2'd0,
    RU_S = 2'd1,
    RU_E = 2'd2,
    RU_W = 2'd3
  } dir_e;

  // Register-file write data select.
  typedef enum logic {
    RFW_ALU   = 1'b0,  // arithmetic result
    RFW_REUSE = 1'b1   // neighbour OpA through the operand reuse network
  } rfw_e;

  // 36-bit per-PE configuration.
  typedef struct packed {
    op_e         op;        // 4
    src_e        sel_a;     // 4
    src_e        sel_b;     // 4
    logic        rf_we;     // 1
    logic [1:0]  rf_waddr;  // 2
    rfw_e        rf_wsel;   // 1
    dir_e        reuse;     // 2
    logic        st_en;     // 1: this PE's Out is the store data of its row/column
    logic        rsvd;      // 1
    word_t       konst;     // 16: MUX B constant
  } pe_cfg_t;

  // 8 global bits.
  typedef struct packed {
    logic [GRF_IW-1:0] grf_idx;
    logic              h_ld;   // streamed load on every H-bus
    logic              v_ld;   // streamed load on every V-bus
    logic              h_st;   // store row data to H-MEM
    logic              v_st;   // store column data to V-MEM
  } glb_cfg_t;

  typedef struct packed {
    pe_cfg_t [NR-1:0][NC-1:0] pe;   // pe[r][c]
    glb_cfg_t                 glb;
  } ctx_t;

endpackage
