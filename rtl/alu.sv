// alu: the 32-bit ALU of a processing element.
//
// Purely combinational: y = op(a, b). Operations are add, subtract, and, or,
// xor, logical left/right shift, arithmetic right shift (shift amount b[4:0]),
// signed and unsigned set-less-than, the low 32 bits of a 32x32 multiply, and
// pass-through of either operand. The control codes LOOP, LI and HALT are
// handled by the PE sequencer; for them the ALU returns b.
//
// The 32-bit width is the architecture's; the operation set is this design's
// choice of a usual integer ALU.
module alu
  import cgra_pkg::*;
(
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y
);

  always_comb begin
    unique case (op)
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_SLL:   y = a << b[4:0];
      OP_SRL:   y = a >> b[4:0];
      OP_SRA:   y = DATA_W'($signed(a) >>> b[4:0]);
      OP_SLT:   y = {31'd0, $signed(a) < $signed(b)};
      OP_SLTU:  y = {31'd0, a < b};
      OP_MUL:   y = a * b;
      OP_PASSA: y = a;
      default:  y = b;
    endcase
  end

endmodule
