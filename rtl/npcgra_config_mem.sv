// npcgra_config_mem: configuration (context) memory of NP-CGRA.
//
// Holds DEPTH context words of CW bits: 32 x 2312 bits (9248 bytes) by
// default, one context per cycle of a kernel. The host writes 32-bit slices:
// slice s of context a is bits 32s+31 .. 32s, and the last slice is partly
// unused. The controller reads one context per cycle; the word appears on
// ctx one cycle after rd_en and is all zeros (every PE idle, no transfers)
// in a cycle after rd_en was low. Size follows the architecture; the slice
// write port and the zero-when-idle output are this design's choices.
module npcgra_config_mem #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned CW    = npcgra_pkg::CTX_W,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned NSL   = (CW + 31) / 32,
  parameter int unsigned SLW   = $clog2(NSL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [SLW-1:0] wr_slice,
  input  logic [31:0]   wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [CW-1:0] ctx
);

  logic [NSL*32-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && wr_slice < SLW'(NSL)) mem[wr_addr][wr_slice*32 +: 32] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !rd_en) ctx <= '0;
    else                  ctx <= mem[rd_addr][CW-1:0];
  end

endmodule
