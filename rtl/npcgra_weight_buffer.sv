// npcgra_weight_buffer: Weight Buffer feeding the GRF.
//
// A 144 x 64-bit buffer (1152 bytes) that holds 64 copies of the GRF contents,
// so that the depthwise weights of 64 channels can be kept on chip and moved
// into the GRF one channel at a time. The host/DMA writes whole 64-bit rows.
// A pulse on load with a copy number c starts a transfer: 16-bit words
// 9c .. 9c+8 (four words per row, word 0 in bits 15:0) are read one per cycle
// and written into GRF entries 0..8 through the GRF's single write port.
// Timing: with the load pulse in cycle 0, word i is read in cycle i+1 and
// written to GRF entry i at the end of cycle i+2 (grf_we high in that cycle);
// busy is high in cycles 1..10. A load pulse while busy is ignored.
// Size and copy count follow the architecture; the packing and the transfer
// sequence are this design's choices.
module npcgra_weight_buffer #(
  parameter int unsigned DEPTH   = 144,
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned COPIES  = 64,
  parameter int unsigned GRF_N   = npcgra_pkg::GRF_N,
  parameter int unsigned DATA_W  = npcgra_pkg::DATA_W,
  parameter int unsigned GRF_IW  = npcgra_pkg::GRF_IW
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host / DMA row write
  input  logic                       wr_en,
  input  logic [$clog2(DEPTH)-1:0]   wr_addr,
  input  logic [WIDTH-1:0]           wr_data,
  // transfer of one copy into the GRF
  input  logic                       load,
  input  logic [$clog2(COPIES)-1:0]  copy,
  output logic                       busy,
  output logic                       grf_we,
  output logic [GRF_IW-1:0]          grf_waddr,
  output logic [DATA_W-1:0]          grf_wdata
);

  localparam int unsigned WPR = WIDTH / DATA_W;        // words per row
  localparam int unsigned WAW = $clog2(DEPTH * WPR);   // word address width

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] rd_row;
  logic [$clog2(WPR)-1:0] rd_lane;
  logic [GRF_IW-1:0] cnt;          // next word to read
  logic              reading;
  logic [WAW-1:0]    base, waddr_w;
  logic              rd_valid;
  logic [GRF_IW-1:0] rd_idx;

  assign waddr_w = base + WAW'(cnt);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      cnt      <= '0;
      base     <= '0;
      rd_valid <= 1'b0;
      rd_idx   <= '0;
      rd_lane  <= '0;
      rd_row   <= '0;
    end else begin
      rd_valid <= 1'b0;
      if (!reading && !rd_valid && load) begin
        reading <= 1'b1;
        cnt     <= '0;
        base    <= WAW'(copy) * WAW'(GRF_N);
      end else if (reading) begin
        rd_row   <= mem[$clog2(DEPTH)'(waddr_w / WAW'(WPR))];
        rd_lane  <= $clog2(WPR)'(waddr_w % WAW'(WPR));
        rd_idx   <= cnt;
        rd_valid <= 1'b1;
        if (cnt == GRF_IW'(GRF_N - 1)) reading <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign busy      = reading | rd_valid;
  assign grf_we    = rd_valid;
  assign grf_waddr = rd_idx;
  assign grf_wdata = rd_row[rd_lane*DATA_W +: DATA_W];

endmodule
