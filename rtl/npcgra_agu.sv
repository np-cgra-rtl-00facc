// npcgra_agu: address generation unit for streamed load-store.
//
// Streamed load-store frees the PEs from address arithmetic: each memory side
// has an AGU that produces the next address every time the context word asks
// for a transfer. The pattern is a two-level strided walk,
//     addr = base + i*s0 + j*s1,   i = 0 .. n0-1 (inner), j = 0, 1, ... (outer)
// which with a suitable data layout (prepared by DMA) covers the row/column
// streams of matrix multiplication and the depthwise-convolution schedules.
// restart returns to base; step advances to the next address on the rising
// edge. addr is the current address, valid in the cycle step is high.
// Only the need for AGUs is given by the architecture; this pattern is this
// design's own choice.
module npcgra_agu #(
  parameter int unsigned AW = 12,
  parameter int unsigned CW = 12   // iteration counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] base,
  input  logic [CW-1:0] n0,      // inner count (0 treated as 1)
  input  logic [AW-1:0] s0,      // inner stride
  input  logic [AW-1:0] s1,      // outer stride
  input  logic          restart,
  input  logic          step,
  output logic [AW-1:0] addr
);

  logic [CW-1:0] i;
  logic [AW-1:0] row;     // base + j*s1

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i    <= '0;
      row  <= '0;
      addr <= '0;
    end else if (restart) begin
      i    <= '0;
      row  <= base;
      addr <= base;
    end else if (step) begin
      if (i + 1'b1 >= n0) begin
        i    <= '0;
        row  <= row + s1;
        addr <= row + s1;
      end else begin
        i    <= i + 1'b1;
        addr <= addr + s0;
      end
    end
  end

endmodule
