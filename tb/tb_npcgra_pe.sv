// tb_npcgra_pe: self-checking test of one PE.
// Checks every MUX A and MUX B source, the OpA output, Output REG hold on NOP,
// an output-stationary MAC sequence in single-cycle MAC mode (one MAC per
// cycle), and register-file writes from the ALU and from each neighbour's
// OpA through the operand reuse MUX.
module tb_npcgra_pe;
  import npcgra_pkg::*;

  logic clk = 0, rst_n = 0;
  pe_cfg_t cfg;
  logic mac_chain = 1;
  logic [15:0] nbr_out [4];
  logic [15:0] nbr_opa [4];
  logic [15:0] hbus, vbus, grf, out, opa;
  int checks = 0, failures = 0;

  npcgra_pe dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .mac_chain(mac_chain), .nbr_out(nbr_out),
    .nbr_opa(nbr_opa), .hbus(hbus), .vbus(vbus), .grf(grf), .out(out), .opa(opa));

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  logic [15:0] rf_model [4];

  function automatic logic [15:0] src_val(src_e s, logic is_b);
    case (s)
      SRC_N: return nbr_out[0]; SRC_S: return nbr_out[1];
      SRC_E: return nbr_out[2]; SRC_W: return nbr_out[3];
      SRC_SELF: return out;
      SRC_R0: return rf_model[0]; SRC_R1: return rf_model[1];
      SRC_R2: return rf_model[2]; SRC_R3: return rf_model[3];
      SRC_HBUS: return hbus; SRC_VBUS: return vbus;
      SRC_CONST: return is_b ? cfg.konst : 16'h0;
      SRC_GRF: return is_b ? grf : 16'h0;
      default: return 16'h0;
    endcase
  endfunction

  task automatic randomize_inputs();
    for (int i = 0; i < 4; i++) begin
      nbr_out[i] = 16'($urandom); nbr_opa[i] = 16'($urandom);
    end
    hbus = 16'($urandom); vbus = 16'($urandom); grf = 16'($urandom);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp, acc;
    cfg = '0;
    randomize_inputs();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4; i++) rf_model[i] = 0;
    @(negedge clk);

    // fill R0-R3 from the ALU (PASSB constant)
    for (int k = 0; k < 4; k++) begin
      cfg = '0; cfg.op = OP_PASSB; cfg.sel_b = SRC_CONST; cfg.konst = 16'(100 + 17 * k);
      cfg.rf_we = 1; cfg.rf_waddr = 2'(k); cfg.rf_wsel = RFW_ALU;
      @(negedge clk);
      rf_model[k] = 16'(100 + 17 * k);
      check("alu->rf out", out, rf_model[k]);
    end

    // MUX A sources, OpA output
    for (int s = 0; s <= 12; s++) begin
      randomize_inputs();
      cfg = '0; cfg.op = OP_PASSA; cfg.sel_a = src_e'(s);
      #1;
      exp = src_val(src_e'(s), 1'b0);
      check($sformatf("opa src %0d", s), opa, exp);
      @(negedge clk);
      check($sformatf("muxA src %0d", s), out, exp);
    end
    // MUX B sources
    for (int s = 0; s <= 12; s++) begin
      randomize_inputs();
      cfg = '0; cfg.op = OP_PASSB; cfg.sel_b = src_e'(s); cfg.konst = 16'($urandom);
      #1;
      exp = src_val(src_e'(s), 1'b1);
      @(negedge clk);
      check($sformatf("muxB src %0d", s), out, exp);
    end
    // NOP holds
    exp = out;
    cfg = '0; cfg.op = OP_NOP; cfg.sel_a = SRC_HBUS;
    repeat (3) begin randomize_inputs(); @(negedge clk); end
    check("nop hold", out, exp);

    // output-stationary MAC: out = sum h*v over 9 cycles, one MAC per cycle
    acc = 0;
    for (int i = 0; i < 9; i++) begin
      hbus = 16'($urandom_range(0, 300)); vbus = 16'($urandom_range(0, 300));
      cfg = '0; cfg.sel_a = SRC_HBUS; cfg.sel_b = SRC_VBUS;
      cfg.op = (i == 0) ? OP_MUL : OP_MAC;
      acc = (i == 0) ? 16'(hbus * vbus) : 16'(acc + hbus * vbus);
      @(negedge clk);
      check("mac step", out, acc);
    end
    // MAC with chaining off: product only
    mac_chain = 0;
    hbus = 7; vbus = 9; cfg.op = OP_MAC;
    @(negedge clk);
    check("mac unchained", out, 16'd63);
    mac_chain = 1;

    // operand reuse: capture neighbour OpA into R1 while computing with GRF
    for (int d = 0; d < 4; d++) begin
      randomize_inputs();
      cfg = '0; cfg.op = OP_PASSB; cfg.sel_b = SRC_GRF;
      cfg.rf_we = 1; cfg.rf_waddr = 2'd1; cfg.rf_wsel = RFW_REUSE; cfg.reuse = dir_e'(d);
      exp = nbr_opa[d];
      acc = grf;
      @(negedge clk);
      rf_model[1] = exp;
      check("reuse keeps own op", out, acc);
      cfg = '0; cfg.op = OP_PASSA; cfg.sel_a = SRC_R1;
      @(negedge clk);
      check($sformatf("reuse dir %0d", d), out, exp);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
