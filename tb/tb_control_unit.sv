// tb_control_unit: decodes assembled instructions of every class, including
// all eleven matrix instructions, and checks the packed control bundle.
module tb_control_unit;
  import intellera_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] instr;
  ctrl_t       ctrl;
  control_unit dut (.instr, .ctrl);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input string name, input logic [31:0] ins, input logic rw, input logic mw,
                   input logic [4:0] alu, input logic [3:0] mac, input logic [1:0] dm);
    instr = ins;
    #1;
    checks++;
    if (ctrl.reg_write !== rw || ctrl.mem_write !== mw || ctrl.alu_ctrl !== alu ||
        ctrl.mac_ctrl !== mac || ctrl.macdm !== dm) begin
      failures++;
      $display("FAIL %s: rw=%b mw=%b alu=%b mac=%b dm=%b", name, ctrl.reg_write,
               ctrl.mem_write, ctrl.alu_ctrl, ctrl.mac_ctrl, ctrl.macdm);
    end
  endtask

  initial begin
    @(posedge clk);
    t("add",  ADD(3, 1, 2),   1, 0, 5'b00000, 4'b1111, 2'b00);
    t("sub",  SUB(4, 1, 2),   1, 0, 5'b00001, 4'b1111, 2'b00);
    t("mul",  MUL(6, 1, 2),   1, 0, 5'b00010, 4'b1111, 2'b00);
    t("and",  AND(6, 1, 2),   1, 0, 5'b00011, 4'b1111, 2'b00);
    t("xor",  XOR(10, 1, 2),  1, 0, 5'b00101, 4'b1111, 2'b00);
    t("or",   OR(7, 1, 2),    1, 0, 5'b00100, 4'b1111, 2'b00);
    t("slt",  SLT(11, 2, 1),  1, 0, 5'b01100, 4'b1111, 2'b00);
    t("lw",   LW(12, 10, 8),  1, 0, 5'b00000, 4'b1111, 2'b00);
    t("addi", ADDI(1, 0, -32), 1, 0, 5'b00000, 4'b1111, 2'b00);
    t("slli", SLLI(12, 1, 3), 1, 0, 5'b00110, 4'b1111, 2'b00);
    t("srli", SRLI(13, 2, 3), 1, 0, 5'b00111, 4'b1111, 2'b00);
    t("sw",   SW(4, 10, 8),   0, 1, 5'b00000, 4'b1111, 2'b00);
    t("bge",  BGE(2, 1, -56), 0, 0, 5'b01000, 4'b1111, 2'b00);
    t("beq",  BEQ(1, 1, 56),  0, 0, 5'b01001, 4'b1111, 2'b00);
    t("bne",  BNE(2, 1, 12),  0, 0, 5'b01010, 4'b1111, 2'b00);
    t("blt",  BLT(2, 1, 16),  0, 0, 5'b01011, 4'b1111, 2'b00);
    t("lmaca", LMAC_A(400, 5), 0, 0, 5'b00000, 4'b0000, 2'b01);
    t("lmacb", LMAC_B(425, 5), 0, 0, 5'b00000, 4'b0001, 2'b10);
    t("clra", CLR_A(),   0, 0, 5'b00000, 4'b0010, 2'b00);
    t("clrb", CLR_B(),   0, 0, 5'b00000, 4'b0011, 2'b00);
    t("clrr", CLR_R(),   0, 0, 5'b00000, 4'b0100, 2'b00);
    t("clrall", CLR_ALL(), 0, 0, 5'b00000, 4'b0101, 2'b00);
    t("macm", MACM(),   0, 0, 5'b00000, 4'b0110, 2'b00);
    t("macadd", MACADD(), 0, 0, 5'b00000, 4'b0111, 2'b00);
    t("macsub", MACSUB(), 0, 0, 5'b00000, 4'b1000, 2'b00);
    t("submac", SUBMAC(), 0, 0, 5'b00000, 4'b1001, 2'b00);
    t("strr", STR_R(500, 5), 0, 0, 5'b00000, 4'b1010, 2'b11);
    // a matrix-looking funct3/MACOP pattern on a normal opcode is not a matrix op
    t("addi-lookalike", {2'b11, 20'h0, 3'b000, 7'b0010011}, 1, 0, 5'b00000, 4'b1111, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
