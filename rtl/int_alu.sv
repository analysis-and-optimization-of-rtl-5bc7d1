// int_alu: 32-bit integer arithmetic and logic unit.
//
// Operations (alu_op_t): add, subtract, multiply (low 32 bits of the product),
// and, or, xor, nor, shift left, logical and arithmetic shift right (by b[4:0]),
// signed and unsigned set-less-than. Undefined codes return 0.
// Purely combinational.
// Integer add, subtract and multiply are specified; the logic, shift and
// compare operations are this design's additions.
module int_alu
  import cfp_pkg::*;
(
  input  alu_op_t     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_MUL:  y = a * b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLL:  y = a << b[4:0];
      ALU_SRL:  y = a >> b[4:0];
      ALU_SRA:  y = 32'($signed(a) >>> b[4:0]);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      default:  y = '0;
    endcase
  end
endmodule
