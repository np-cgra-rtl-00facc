// npcgra_grf: global register file (GRF) of NP-CGRA.
//
// A small single-port register file whose read word is broadcast to every PE
// (MUX B source "GRF"), used to supply the same depthwise-convolution weight
// to the whole array. The read index comes from the current context word.
// It is filled from the Weight Buffer or directly by DMA; both share the one
// write port. Being single-port, a write takes the port: in a write cycle the
// read word is zero. Reads are combinational, writes happen on the rising
// edge. Nine 16-bit entries hold one 3x3 kernel: the Weight Buffer is sized
// at 64 GRF copies in 1152 bytes, i.e. 18 bytes per copy. Zero on reset.
module npcgra_grf #(
  parameter int unsigned ENTRIES = npcgra_pkg::GRF_N,
  parameter int unsigned DATA_W  = npcgra_pkg::DATA_W,
  parameter int unsigned IW      = npcgra_pkg::GRF_IW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [IW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [IW-1:0]     ridx,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] regs [ENTRIES];

  always_comb begin
    rdata = '0;
    if (!we && ridx < IW'(ENTRIES)) rdata = regs[ridx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) regs[i] <= '0;
    end else if (we && waddr < IW'(ENTRIES)) begin
      regs[waddr] <= wdata;
    end
  end

endmodule
