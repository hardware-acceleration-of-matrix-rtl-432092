// mac_decoder: decoder for the custom matrix MAC instructions.
//
// Combinational. Inputs are funct3 (instruction bits 9-7), MAC_OP (the main
// decoder's flag that the opcode is the matrix opcode) and MACOP (instruction
// bits 31-30, the operation class: 00 load, 01 clear, 10 arithmetic, 11
// store). Outputs are MACControl, the 4-bit operation code for the MAC unit,
// and MACDM, the 2-bit matrix-transfer request to data memory (01 load A,
// 10 load B, 11 store R, 00 none). The code table is the design's own
// instruction table. Combinations the table does not define, and any
// non-matrix instruction, give MAC_NOP (4'b1111, this design's choice) and
// MACDM 00.
module mac_decoder
  import intellera_pkg::*;
(
  input  logic [2:0] funct3,
  input  logic       mac_op,
  input  logic [1:0] macop,
  output mac_ctrl_e  mac_ctrl,
  output macdm_e     macdm
);
  always_comb begin
    mac_ctrl = MAC_NOP;
    macdm    = MACDM_NONE;
    if (mac_op) begin
      unique case (macop)
        2'b00: unique case (funct3)
          3'b000:  begin mac_ctrl = MAC_LOAD_A; macdm = MACDM_LOAD_A; end
          3'b001:  begin mac_ctrl = MAC_LOAD_B; macdm = MACDM_LOAD_B; end
          default: ;
        endcase
        2'b01: unique case (funct3)
          3'b000:  mac_ctrl = MAC_CLR_A;
          3'b001:  mac_ctrl = MAC_CLR_B;
          3'b010:  mac_ctrl = MAC_CLR_R;
          3'b011:  mac_ctrl = MAC_CLR_ALL;
          default: ;
        endcase
        2'b10: unique case (funct3)
          3'b000:  mac_ctrl = MAC_MUL;
          3'b001:  mac_ctrl = MAC_ADD;
          3'b010:  mac_ctrl = MAC_SUB;
          3'b011:  mac_ctrl = MAC_RSUB;
          default: ;
        endcase
        2'b11: if (funct3 == 3'b000) begin mac_ctrl = MAC_STR_R; macdm = MACDM_STORE_R; end
        default: ;
      endcase
    end
  end
endmodule
