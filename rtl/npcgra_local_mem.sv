// npcgra_local_mem: one side (H-MEM or V-MEM) of the NP-CGRA local memory.
//
// The crossbar-style memory bus splits local memory in two: H-MEM drives the
// row busses and V-MEM the column busses. Each is built here from NBANK banks,
// bank i driving bus i, and each bank has SETS copies so that DMA can fill one
// set while the array works on the other (double buffering).
// Array port: all banks use the same address, which comes from the side's
// AGU; a read returns one word per bank one cycle later, and the bus keeps
// that word until the next read. A store writes a per-bank word at the store
// AGU's address; a bank may read and write in the same cycle (the read
// returns the old word). The array uses set arr_set.
// Host port: one word per cycle, any bank and set, read data one cycle later.
// If host and array write the same word in one cycle, the array wins.
// Capacity: 8 banks x 2496 words x 16 bits = 39 KB per set, as specified;
// the bank organisation, shared address and port arrangement are this
// design's own.
module npcgra_local_mem #(
  parameter int unsigned NBANK  = 8,
  parameter int unsigned DEPTH  = 2496,
  parameter int unsigned SETS   = 2,
  parameter int unsigned DATA_W = npcgra_pkg::DATA_W,
  parameter int unsigned AW     = $clog2(DEPTH),
  parameter int unsigned SW     = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned BW     = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // array side
  input  logic [SW-1:0]     arr_set,
  input  logic              arr_rd,
  input  logic [AW-1:0]     arr_raddr,
  output logic [DATA_W-1:0] arr_rdata [NBANK],
  input  logic              arr_wr,
  input  logic [AW-1:0]     arr_waddr,
  input  logic [DATA_W-1:0] arr_wdata [NBANK],
  // host / DMA side
  input  logic              host_en,
  input  logic              host_we,
  input  logic [SW-1:0]     host_set,
  input  logic [BW-1:0]     host_bank,
  input  logic [AW-1:0]     host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata
);

  localparam int unsigned WORDS = SETS * DEPTH;

  logic [DATA_W-1:0] host_rd [NBANK];
  logic [BW-1:0]     host_bank_q;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [DATA_W-1:0] mem [WORDS];
    localparam int unsigned MAW = $clog2(WORDS);
    logic [MAW-1:0] a_ra, a_wa, h_a;

    assign a_ra = MAW'(arr_set)  * MAW'(DEPTH) + MAW'(arr_raddr);
    assign a_wa = MAW'(arr_set)  * MAW'(DEPTH) + MAW'(arr_waddr);
    assign h_a  = MAW'(host_set) * MAW'(DEPTH) + MAW'(host_addr);

    always_ff @(posedge clk) begin
      if (host_en && host_we && host_bank == BW'(b)) mem[h_a] <= host_wdata;
      if (arr_wr) mem[a_wa] <= arr_wdata[b];
    end

    always_ff @(posedge clk) begin
      if (!rst_n)      arr_rdata[b] <= '0;
      else if (arr_rd) arr_rdata[b] <= mem[a_ra];
    end

    always_ff @(posedge clk) begin
      if (host_en && !host_we && host_bank == BW'(b)) host_rd[b] <= mem[h_a];
    end
  end

  always_ff @(posedge clk) begin
    if (host_en && !host_we) host_bank_q <= host_bank;
  end

  assign host_rdata = host_rd[host_bank_q];

endmodule
