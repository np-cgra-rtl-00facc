// npcgra_pe: one NP-CGRA processing element.
//
// Structure (after the PE diagram of the architecture): two operand MUXes feed
// the dual-mode MULT+ALU, whose result is captured in the Output REG ("Out").
// MUX A chooses among the four neighbours' Out, the PE's own Out, registers
// R0-R3, the row bus (H-bus) and the column bus (V-bus). MUX B has the same
// sources plus a configuration constant and the global register file (GRF).
// The operand reuse network is the NP-CGRA extension: the output of MUX A is
// exported as OpA, and a reuse MUX picks the OpA of the north, south, east or
// west neighbour; a register-file MUX then writes either that value or the
// ALU result into R0-R3. A PE can thus pass its current operand to a
// neighbour for use in the next cycle without giving up its own operation.
//
// Timing: everything between the context word, the busses and the register
// inputs is combinational; Out and R0-R3 update on the rising clock edge.
// Out is written by every operation other than OP_NOP and is the accumulator
// of OP_MAC. Synchronous active-low reset clears Out and R0-R3 (reset
// behaviour is this design's choice).
module npcgra_pe #(
  parameter int unsigned DATA_W = npcgra_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  npcgra_pkg::pe_cfg_t cfg,
  input  logic              mac_chain,
  // neighbour outputs and operands, index dir_e (N, S, E, W)
  input  logic [DATA_W-1:0] nbr_out [4],
  input  logic [DATA_W-1:0] nbr_opa [4],
  input  logic [DATA_W-1:0] hbus,
  input  logic [DATA_W-1:0] vbus,
  input  logic [DATA_W-1:0] grf,
  output logic [DATA_W-1:0] out,
  output logic [DATA_W-1:0] opa
);

  import npcgra_pkg::*;

  logic [DATA_W-1:0] rf [4];
  logic [DATA_W-1:0] opb, alu_y, reuse_d, rf_d;

  // Operand source selection shared by both MUXes.
  function automatic logic [DATA_W-1:0] pick(input src_e s, input logic is_b);
    unique case (s)
      SRC_N:     return nbr_out[RU_N];
      SRC_S:     return nbr_out[RU_S];
      SRC_E:     return nbr_out[RU_E];
      SRC_W:     return nbr_out[RU_W];
      SRC_SELF:  return out;
      SRC_R0:    return rf[0];
      SRC_R1:    return rf[1];
      SRC_R2:    return rf[2];
      SRC_R3:    return rf[3];
      SRC_HBUS:  return hbus;
      SRC_VBUS:  return vbus;
      SRC_CONST: return is_b ? cfg.konst : '0;
      SRC_GRF:   return is_b ? grf : '0;
      default:   return '0;
    endcase
  endfunction

  assign opa = pick(cfg.sel_a, 1'b0);
  assign opb = pick(cfg.sel_b, 1'b1);

  npcgra_alu #(.DATA_W(DATA_W)) u_alu (
    .op       (cfg.op),
    .mac_chain(mac_chain),
    .a        (opa),
    .b        (opb),
    .acc      (out),
    .y        (alu_y)
  );

  assign reuse_d = nbr_opa[cfg.reuse];
  assign rf_d    = (cfg.rf_wsel == RFW_REUSE) ? reuse_d : alu_y;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out <= '0;
      for (int i = 0; i < 4; i++) rf[i] <= '0;
    end else begin
      if (cfg.op != OP_NOP) out <= alu_y;
      if (cfg.rf_we) rf[cfg.rf_waddr] <= rf_d;
    end
  end

endmodule
