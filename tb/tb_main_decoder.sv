// tb_main_decoder: checks the control outputs for every supported opcode and
// that an unknown opcode writes nothing.
module tb_main_decoder;
  import intellera_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0] opcode;
  logic       reg_write, mem_write, branch, jump, jalr, alu_src, mac_op;
  res_src_e   result_src;
  imm_src_e   imm_src;
  logic [1:0] alu_op;
  main_decoder dut (.opcode, .reg_write, .result_src, .mem_write, .branch, .jump,
                    .jalr, .alu_src, .imm_src, .alu_op, .mac_op);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {reg_write, result_src[1:0], mem_write, branch, jump, jalr, alu_src, alu_op[1:0], mac_op}
  task automatic t(input logic [6:0] op, input logic [10:0] exp, input logic [2:0] exp_imm,
                   input logic chk_imm);
    opcode = op;
    #1;
    checks++;
    if ({reg_write, result_src, mem_write, branch, jump, jalr, alu_src, alu_op, mac_op} !== exp ||
        (chk_imm && imm_src !== exp_imm)) begin
      failures++;
      $display("FAIL op=%b got %b imm %0d exp %b imm %0d", op,
               {reg_write, result_src, mem_write, branch, jump, jalr, alu_src, alu_op, mac_op},
               imm_src, exp, exp_imm);
    end
  endtask

  initial begin
    @(posedge clk);
    //                 rw rs  mw br j jr as aop mac
    t(7'b0110011, 11'b1_00_0_0_0_0_0_10_0, 3'd0, 0); // R
    t(7'b0010011, 11'b1_00_0_0_0_0_1_10_0, 3'd0, 1); // I
    t(7'b0000011, 11'b1_01_0_0_0_0_1_00_0, 3'd0, 1); // LW
    t(7'b0100011, 11'b0_00_1_0_0_0_1_00_0, 3'd1, 1); // SW
    t(7'b1100011, 11'b0_00_0_1_0_0_0_01_0, 3'd2, 1); // branch
    t(7'b1101111, 11'b1_10_0_0_1_0_0_00_0, 3'd3, 1); // JAL
    t(7'b1100111, 11'b1_10_0_0_1_1_1_00_0, 3'd0, 1); // JALR
    t(7'b0110111, 11'b1_00_0_0_0_0_1_00_0, 3'd4, 1); // LUI
    t(7'b1110111, 11'b0_00_0_0_0_0_0_00_1, 3'd0, 0); // matrix
    t(7'b0000000, 11'b0_00_0_0_0_0_0_00_0, 3'd0, 0); // unknown
    t(7'b1111111, 11'b0_00_0_0_0_0_0_00_0, 3'd0, 0); // unknown
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
