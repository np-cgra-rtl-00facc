// tb_npcgra_alu: self-checking test of the dual-mode MULT+ALU.
// Applies random operands to every opcode in both MAC modes and compares with
// a reference computed here from plain integer arithmetic. Key check: with
// chaining on, MAC gives acc + a*b; with chaining off it gives a*b only.
module tb_npcgra_alu;
  import npcgra_pkg::*;

  op_e         op;
  logic        mac_chain;
  logic [15:0] a, b, acc, y;
  int checks = 0, failures = 0;

  npcgra_alu dut (.op(op), .mac_chain(mac_chain), .a(a), .b(b), .acc(acc), .y(y));

  function automatic logic [15:0] ref_model(op_e o, logic m, logic [15:0] x, logic [15:0] z, logic [15:0] q);
    int sx, sz;
    longint p;
    sx = int'($signed(x)); sz = int'($signed(z));
    p = longint'(x) * longint'(z);
    case (o)
      OP_ADD:   return 16'(int'(x) + int'(z));
      OP_SUB:   return 16'(int'(x) - int'(z));
      OP_MUL:   return 16'(p);
      OP_MAC:   return m ? 16'(longint'(q) + p) : 16'(p);
      OP_AND:   return x & z;
      OP_OR:    return x | z;
      OP_XOR:   return x ^ z;
      OP_SLL:   return 16'(int'(x) * (1 << z[3:0]));
      OP_SRA:   return 16'(sx / (1 << z[3:0]) - ((sx < 0 && (sx % (1 << z[3:0])) != 0) ? 1 : 0));
      OP_MAX:   return (sx > sz) ? x : z;
      OP_MIN:   return (sx < sz) ? x : z;
      OP_PASSA: return x;
      OP_PASSB: return z;
      default:  return q;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    for (int n = 0; n < 4000; n++) begin
      op        = op_e'(n % 14);
      mac_chain = (n / 14) % 2 == 0;
      a = 16'($urandom); b = 16'($urandom); acc = 16'($urandom);
      if (n % 7 == 0) a = 16'($urandom_range(0, 20));
      #1;
      exp = ref_model(op, mac_chain, a, b, acc);
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s chain=%0b a=%h b=%h acc=%h y=%h exp=%h", op.name(), mac_chain, a, b, acc, y, exp);
      end
    end
    // explicit dual-mode example: 3*4 + 5
    op = OP_MAC; a = 3; b = 4; acc = 5;
    mac_chain = 1; #1; checks++; if (y != 17) failures++;
    mac_chain = 0; #1; checks++; if (y != 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
