// npcgra_pe_array: the NR x NC PE array and its interconnect.
//
// Three networks connect the PEs:
//  * the mesh output network: each PE reads the Out register of its north,
//    south, east and west neighbour (baseline CGRA interconnect);
//  * the operand reuse network (NP-CGRA extension): each PE reads the current
//    MUX A operand (OpA) of the same four neighbours, an input-to-input path;
//  * the crossbar-style memory busses: H-bus r reaches every PE of row r and
//    V-bus c every PE of column c, so a word read from memory is shared by a
//    whole row or column in the same cycle.
// The GRF read port is broadcast to all PEs. For stores, the Out register of
// the PE whose st_en bit is set in a row (column) becomes that row's
// (column's) store word; several set bits are OR-combined, so a context
// should set at most one per row or per column that is being stored.
// Neighbour inputs past the array edge read zero (no wrap-around); that edge
// behaviour and the store-data collection are this design's own choices.
// All paths are combinational; state lives in the PEs.
module npcgra_pe_array #(
  parameter int unsigned NR     = npcgra_pkg::NR,
  parameter int unsigned NC     = npcgra_pkg::NC,
  parameter int unsigned DATA_W = npcgra_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  npcgra_pkg::pe_cfg_t cfg    [NR][NC],
  input  logic              mac_chain,
  input  logic [DATA_W-1:0] hbus     [NR],
  input  logic [DATA_W-1:0] vbus     [NC],
  input  logic [DATA_W-1:0] grf,
  output logic [DATA_W-1:0] pe_out   [NR][NC],
  output logic [DATA_W-1:0] h_st_data[NR],
  output logic [DATA_W-1:0] v_st_data[NC]
);

  import npcgra_pkg::*;

  logic [DATA_W-1:0] pe_opa [NR][NC];

  for (genvar r = 0; r < NR; r++) begin : g_row
    for (genvar c = 0; c < NC; c++) begin : g_col
      logic [DATA_W-1:0] nbr_out [4];
      logic [DATA_W-1:0] nbr_opa [4];

      if (r > 0) begin : g_n
        assign nbr_out[RU_N] = pe_out[r-1][c];
        assign nbr_opa[RU_N] = pe_opa[r-1][c];
      end else begin : g_n0
        assign nbr_out[RU_N] = '0;
        assign nbr_opa[RU_N] = '0;
      end
      if (r < NR-1) begin : g_s
        assign nbr_out[RU_S] = pe_out[r+1][c];
        assign nbr_opa[RU_S] = pe_opa[r+1][c];
      end else begin : g_s0
        assign nbr_out[RU_S] = '0;
        assign nbr_opa[RU_S] = '0;
      end
      if (c < NC-1) begin : g_e
        assign nbr_out[RU_E] = pe_out[r][c+1];
        assign nbr_opa[RU_E] = pe_opa[r][c+1];
      end else begin : g_e0
        assign nbr_out[RU_E] = '0;
        assign nbr_opa[RU_E] = '0;
      end
      if (c > 0) begin : g_w
        assign nbr_out[RU_W] = pe_out[r][c-1];
        assign nbr_opa[RU_W] = pe_opa[r][c-1];
      end else begin : g_w0
        assign nbr_out[RU_W] = '0;
        assign nbr_opa[RU_W] = '0;
      end

      npcgra_pe #(.DATA_W(DATA_W)) u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .cfg      (cfg[r][c]),
        .mac_chain(mac_chain),
        .nbr_out  (nbr_out),
        .nbr_opa  (nbr_opa),
        .hbus     (hbus[r]),
        .vbus     (vbus[c]),
        .grf      (grf),
        .out      (pe_out[r][c]),
        .opa      (pe_opa[r][c])
      );
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      h_st_data[r] = '0;
      for (int c = 0; c < NC; c++)
        if (cfg[r][c].st_en) h_st_data[r] |= pe_out[r][c];
    end
    for (int c = 0; c < NC; c++) begin
      v_st_data[c] = '0;
      for (int r = 0; r < NR; r++)
        if (cfg[r][c].st_en) v_st_data[c] |= pe_out[r][c];
    end
  end

endmodule
