// tb_alu: self-checking test of the 32-bit ALU.
// Applies directed corner cases and random operands to every operation and
// compares with a reference computed here with 64-bit arithmetic.
module tb_alu;
  import cgra_pkg::*;

  op_e         op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] ref_alu(op_e o, logic [31:0] x, logic [31:0] z);
    longint sx, sz;
    logic [63:0] p;
    sx = longint'($signed(x));
    sz = longint'($signed(z));
    case (o)
      OP_ADD:   return 32'(64'(x) + 64'(z));
      OP_SUB:   return 32'(64'(x) - 64'(z));
      OP_AND:   return x & z;
      OP_OR:    return x | z;
      OP_XOR:   return x ^ z;
      OP_SLL:   begin p = 64'(x) << z[4:0]; return p[31:0]; end
      OP_SRL:   begin p = 64'(x) >> z[4:0]; return p[31:0]; end
      OP_SRA:   begin p = 64'(sx >>> z[4:0]); return p[31:0]; end
      OP_SLT:   return (sx < sz) ? 32'd1 : 32'd0;
      OP_SLTU:  return (64'(x) < 64'(z)) ? 32'd1 : 32'd0;
      OP_MUL:   begin p = 64'(x) * 64'(z); return p[31:0]; end
      OP_PASSA: return x;
      default:  return z;
    endcase
  endfunction

  task automatic check(op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};

  initial begin
    for (int o = 0; o < 16; o++)
      foreach (corner[i]) foreach (corner[j]) check(op_e'(o), corner[i], corner[j]);
    for (int n = 0; n < 2000; n++) check(op_e'($urandom_range(0, 15)), $urandom, $urandom);
    // a few hand-computed values
    check(OP_SUB, 32'd5, 32'd7);     // -2
    checks++; if (y !== 32'hFFFF_FFFE) failures++;
    check(OP_SRA, 32'h8000_0000, 32'd4);
    checks++; if (y !== 32'hF800_0000) failures++;
    check(OP_MUL, 32'd300, 32'd7);
    checks++; if (y !== 32'd2100) failures++;
    check(OP_SLT, 32'hFFFF_FFFF, 32'd0);
    checks++; if (y !== 32'd1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
