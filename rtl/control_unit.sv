// control_unit: decode-stage control of the Intellera core.
//
// Combinational. It combines the three decoders the design describes: the
// main decoder (opcode), the ALU decoder (funct3/funct7) and the MAC decoder
// (matrix funct3 in bits 9-7 and MACOP in bits 31-30), and packs their
// outputs into one ctrl_t bundle that the pipeline carries to later stages.
// Input is the 32-bit instruction in decode; output is the bundle.
module control_unit
  import intellera_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [1:0] alu_op;
  logic       mac_op;
  res_src_e   result_src;
  imm_src_e   imm_src;
  alu_ctrl_e  alu_ctrl;
  mac_ctrl_e  mac_ctrl;
  macdm_e     macdm;
  logic       reg_write, mem_write, branch, jump, jalr, alu_src;

  main_decoder u_main (
    .opcode(instr[6:0]), .reg_write, .result_src, .mem_write, .branch, .jump,
    .jalr, .alu_src, .imm_src, .alu_op, .mac_op
  );

  alu_decoder u_alu_dec (
    .alu_op, .funct3(instr[14:12]), .funct7(instr[31:25]),
    .is_rtype(instr[6:0] == OP_R), .alu_ctrl
  );

  mac_decoder u_mac_dec (
    .funct3(instr[9:7]), .mac_op, .macop(instr[31:30]), .mac_ctrl, .macdm
  );

  always_comb begin
    ctrl.reg_write  = reg_write;
    ctrl.result_src = result_src;
    ctrl.mem_write  = mem_write;
    ctrl.branch     = branch;
    ctrl.jump       = jump;
    ctrl.jalr       = jalr;
    ctrl.alu_src    = alu_src;
    ctrl.imm_src    = imm_src;
    ctrl.alu_ctrl   = alu_ctrl;
    ctrl.mac_ctrl   = mac_ctrl;
    ctrl.macdm      = macdm;
  end
endmodule
