// rv_asm_pkg: instruction encoders used by the testbenches to build programs
// for the Intellera core: the RISC-V formats (R, I, S, B, J, U) and the
// custom matrix format (opcode 1110111; funct3 in bits 9-7, Row in bits
// 19-10, Offset in bits 29-20, MACOP in bits 31-30).
package rv_asm_pkg;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3, input logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, 7'b0110011};
  endfunction

  function automatic logic [31:0] enc_i(input int imm, input logic [4:0] rs1,
      input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    logic [11:0] im = imm[11:0];
    return {im, rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] enc_s(input int imm, input logic [4:0] rs2,
      input logic [4:0] rs1);
    logic [11:0] im = imm[11:0];
    return {im[11:5], rs2, rs1, 3'b010, im[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input int imm, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3);
    logic [12:0] im = imm[12:0];
    return {im[12], im[10:5], rs2, rs1, f3, im[4:1], im[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_j(input int imm, input logic [4:0] rd);
    logic [20:0] im = imm[20:0];
    return {im[20], im[10:1], im[11], im[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] enc_u(input logic [19:0] imm, input logic [4:0] rd);
    return {imm, rd, 7'b0110111};
  endfunction

  function automatic logic [31:0] enc_mac(input logic [1:0] macop, input logic [2:0] f3,
      input int row, input int off);
    logic [9:0] r = row[9:0];
    logic [9:0] o = off[9:0];
    return {macop, o, r, f3, 7'b1110111};
  endfunction

  // Mnemonic helpers
  function automatic logic [31:0] ADD (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'b000, rd); endfunction
  function automatic logic [31:0] SUB (input logic [4:0] rd, rs1, rs2); return enc_r(7'h20, rs2, rs1, 3'b000, rd); endfunction
  function automatic logic [31:0] MUL (input logic [4:0] rd, rs1, rs2); return enc_r(7'h01, rs2, rs1, 3'b000, rd); endfunction
  function automatic logic [31:0] AND (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'b111, rd); endfunction
  function automatic logic [31:0] OR  (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'b110, rd); endfunction
  function automatic logic [31:0] XOR (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'b100, rd); endfunction
  function automatic logic [31:0] SLT (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'b010, rd); endfunction
  function automatic logic [31:0] ADDI(input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI(input logic [4:0] rd, rs1, input int sh);  return enc_i(sh & 31, rs1, 3'b001, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI(input logic [4:0] rd, rs1, input int sh);  return enc_i(sh & 31, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] LW  (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW  (input logic [4:0] rs2, rs1, input int imm); return enc_s(imm, rs2, rs1); endfunction
  function automatic logic [31:0] BEQ (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] BNE (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] BLT (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'b100); endfunction
  function automatic logic [31:0] BGE (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'b101); endfunction
  function automatic logic [31:0] JAL (input logic [4:0] rd, input int off); return enc_j(off, rd); endfunction
  function automatic logic [31:0] JALR(input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] LUI (input logic [4:0] rd, input logic [19:0] imm); return enc_u(imm, rd); endfunction

  function automatic logic [31:0] LMAC_A (input int row, off); return enc_mac(2'b00, 3'b000, row, off); endfunction
  function automatic logic [31:0] LMAC_B (input int row, off); return enc_mac(2'b00, 3'b001, row, off); endfunction
  function automatic logic [31:0] CLR_A  ();                   return enc_mac(2'b01, 3'b000, 0, 0);     endfunction
  function automatic logic [31:0] CLR_B  ();                   return enc_mac(2'b01, 3'b001, 0, 0);     endfunction
  function automatic logic [31:0] CLR_R  ();                   return enc_mac(2'b01, 3'b010, 0, 0);     endfunction
  function automatic logic [31:0] CLR_ALL();                   return enc_mac(2'b01, 3'b011, 0, 0);     endfunction
  function automatic logic [31:0] MACM   ();                   return enc_mac(2'b10, 3'b000, 0, 0);     endfunction
  function automatic logic [31:0] MACADD();                   return enc_mac(2'b10, 3'b001, 0, 0);     endfunction
  function automatic logic [31:0] MACSUB();                   return enc_mac(2'b10, 3'b010, 0, 0);     endfunction
  function automatic logic [31:0] SUBMAC();                   return enc_mac(2'b10, 3'b011, 0, 0);     endfunction
  function automatic logic [31:0] STR_R  (input int row, off); return enc_mac(2'b11, 3'b000, row, off); endfunction

endpackage
