// main_decoder: opcode decoder of the Intellera control unit.
//
// Purely combinational. From the 7-bit opcode it produces the datapath
// controls (register write, result source, memory write, branch, jump,
// immediate format, ALU operand select), the 2-bit ALUOp class handed to the
// ALU decoder, and MAC_OP, which flags the custom matrix opcode 7'b1110111 to
// the MAC decoder. The instruction classes follow the RISC-V subset the design
// supports (R, I, load, store, branch) plus JAL/JALR and LUI, which this
// design adds so that jumps and large constants work. ALUOp encoding
// (00 add, 01 branch compare, 10 funct-decoded) is this design's own choice.
// An unknown opcode decodes as a no-op (no register or memory write).
module main_decoder
  import intellera_pkg::*;
(
  input  logic [6:0] opcode,
  output logic       reg_write,
  output res_src_e   result_src,
  output logic       mem_write,
  output logic       branch,
  output logic       jump,
  output logic       jalr,
  output logic       alu_src,
  output imm_src_e   imm_src,
  output logic [1:0] alu_op,
  output logic       mac_op
);
  always_comb begin
    reg_write  = 1'b0;
    result_src = RES_ALU;
    mem_write  = 1'b0;
    branch     = 1'b0;
    jump       = 1'b0;
    jalr       = 1'b0;
    alu_src    = 1'b0;
    imm_src    = IMM_I;
    alu_op     = 2'b00;
    mac_op     = 1'b0;
    unique case (opcode)
      OP_R:     begin reg_write = 1'b1; alu_op = 2'b10; end
      OP_I:     begin reg_write = 1'b1; alu_src = 1'b1; alu_op = 2'b10; end
      OP_LOAD:  begin reg_write = 1'b1; alu_src = 1'b1; result_src = RES_MEM; end
      OP_STORE: begin mem_write = 1'b1; alu_src = 1'b1; imm_src = IMM_S; end
      OP_BR:    begin branch = 1'b1; imm_src = IMM_B; alu_op = 2'b01; end
      OP_JAL:   begin reg_write = 1'b1; jump = 1'b1; imm_src = IMM_J; result_src = RES_PC4; end
      OP_JALR:  begin reg_write = 1'b1; jump = 1'b1; jalr = 1'b1; alu_src = 1'b1;
                      result_src = RES_PC4; end
      OP_LUI:   begin reg_write = 1'b1; alu_src = 1'b1; imm_src = IMM_U; end
      OP_MAC:   begin mac_op = 1'b1; end
      default:  ;
    endcase
  end
endmodule
