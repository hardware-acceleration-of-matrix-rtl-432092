// alu: arithmetic and logic unit of the Intellera core.
//
// Combinational. Operands a and b are 32 bits; alu_ctrl is the 5-bit code of
// the design's RISC-V instruction table. ADD, SUB, MUL (low 32 bits of the
// product), AND, OR, XOR, SLT (signed), SLL and SRL (shift amount b[4:0])
// give their usual results. The branch codes BEQ, BNE, BLT and BGE (signed)
// put the outcome of the comparison in bit 0 of the result, which the
// execute stage uses as "branch taken".
module alu
  import intellera_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctrl_e   alu_ctrl,
  output logic [31:0] result
);
  logic signed [31:0] sa, sb;
  assign sa = a;
  assign sb = b;

  always_comb begin
    unique case (alu_ctrl)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_MUL: result = a * b;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_XOR: result = a ^ b;
      ALU_SLL: result = a << b[4:0];
      ALU_SRL: result = a >> b[4:0];
      ALU_SLT: result = {31'b0, sa < sb};
      ALU_BEQ: result = {31'b0, a == b};
      ALU_BNE: result = {31'b0, a != b};
      ALU_BLT: result = {31'b0, sa < sb};
      ALU_BGE: result = {31'b0, sa >= sb};
      default: result = a + b;
    endcase
  end
endmodule
