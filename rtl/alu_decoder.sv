// alu_decoder: turns ALUOp, funct3 and funct7 into the 5-bit ALU control.
//
// Combinational. ALUOp 00 selects ADD (address calculation, LUI), 01 selects
// the branch comparison named by funct3 (BEQ, BNE, BLT, BGE), and 10 decodes
// the R- and I-type operations. The resulting codes are the ones of the
// design's RISC-V instruction table: ADD, SUB (funct7 0100000), MUL (funct7
// 0000001), AND, OR, XOR, SLT, SLL(I) and SRL(I). SUB and MUL exist only for
// R-type (is_rtype); for I-type, funct3 000 is always ADDI. funct3 values the
// table does not list (SLTU, SRA, unsigned branches) fall back to ADD, SRL
// and BEQ, BLT, BGE respectively, which is this design's own choice.
module alu_decoder
  import intellera_pkg::*;
(
  input  logic [1:0] alu_op,
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  input  logic       is_rtype,
  output alu_ctrl_e  alu_ctrl
);
  always_comb begin
    alu_ctrl = ALU_ADD;
    unique case (alu_op)
      2'b01: begin
        unique case (funct3)
          3'b000:          alu_ctrl = ALU_BEQ;
          3'b001:          alu_ctrl = ALU_BNE;
          3'b100, 3'b110:  alu_ctrl = ALU_BLT;
          3'b101, 3'b111:  alu_ctrl = ALU_BGE;
          default:         alu_ctrl = ALU_BEQ;
        endcase
      end
      2'b10: begin
        unique case (funct3)
          3'b000: begin
            if (is_rtype && funct7 == 7'b0100000)      alu_ctrl = ALU_SUB;
            else if (is_rtype && funct7 == 7'b0000001) alu_ctrl = ALU_MUL;
            else                                       alu_ctrl = ALU_ADD;
          end
          3'b111:  alu_ctrl = ALU_AND;
          3'b110:  alu_ctrl = ALU_OR;
          3'b100:  alu_ctrl = ALU_XOR;
          3'b010:  alu_ctrl = ALU_SLT;
          3'b001:  alu_ctrl = ALU_SLL;
          3'b101:  alu_ctrl = ALU_SRL;
          default: alu_ctrl = ALU_ADD;
        endcase
      end
      default: alu_ctrl = ALU_ADD;
    endcase
  end
endmodule
