// imm_extend: immediate extraction and sign extension for the Intellera core.
//
// Combinational. imm_src selects the RISC-V format: I (loads, ALU immediates,
// JALR), S (stores), B (branches), J (JAL) or U (LUI); the 32-bit result is
// sign-extended from the instruction's sign bit (U is the upper 20 bits with
// 12 zero bits below). This is the standard RISC-V immediate layout; the
// matrix instructions carry their Row and Offset fields separately and do not
// use this unit.
// imm[31] is instr[31] in every format, so that output bit is a plain wire.
module imm_extend
  import intellera_pkg::*;
(
  input  logic [31:7] instr,
  input  imm_src_e    imm_src,
  output logic [31:0] imm
);
  always_comb begin
    unique case (imm_src)
      IMM_I:   imm = {{20{instr[31]}}, instr[31:20]};
      IMM_S:   imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B:   imm = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_J:   imm = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
      IMM_U:   imm = {instr[31:12], 12'b0};
      default: imm = {{20{instr[31]}}, instr[31:20]};
    endcase
  end
endmodule
