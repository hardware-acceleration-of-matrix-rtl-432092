// tb_alu_decoder: checks the ALUOp/funct3/funct7 to ALU-control mapping
// against the RISC-V instruction table of the design.
module tb_alu_decoder;
  import intellera_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] alu_op;
  logic [2:0] funct3;
  logic [6:0] funct7;
  logic       is_rtype;
  alu_ctrl_e  alu_ctrl;
  alu_decoder dut (.alu_op, .funct3, .funct7, .is_rtype, .alu_ctrl);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [1:0] op, input logic [2:0] f3, input logic [6:0] f7,
                   input logic rt, input logic [4:0] exp);
    alu_op = op; funct3 = f3; funct7 = f7; is_rtype = rt;
    #1;
    checks++;
    if (alu_ctrl !== exp) begin
      failures++;
      $display("FAIL op=%b f3=%b f7=%b rt=%b got %b exp %b", op, f3, f7, rt, alu_ctrl, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    // R-type rows of the table
    t(2'b10, 3'b000, 7'b0000000, 1, 5'b00000); // ADD
    t(2'b10, 3'b000, 7'b0100000, 1, 5'b00001); // SUB
    t(2'b10, 3'b000, 7'b0000001, 1, 5'b00010); // MUL
    t(2'b10, 3'b111, 7'b0000000, 1, 5'b00011); // AND
    t(2'b10, 3'b100, 7'b0000000, 1, 5'b00101); // XOR
    t(2'b10, 3'b110, 7'b0000000, 1, 5'b00100); // OR
    t(2'b10, 3'b010, 7'b0000000, 1, 5'b01100); // SLT
    // I-type
    t(2'b10, 3'b000, 7'b0100000, 0, 5'b00000); // ADDI with negative imm bits
    t(2'b10, 3'b000, 7'b0000001, 0, 5'b00000); // ADDI
    t(2'b10, 3'b001, 7'b0000000, 0, 5'b00110); // SLLI
    t(2'b10, 3'b101, 7'b0000000, 0, 5'b00111); // SRLI
    // branches
    t(2'b01, 3'b101, 7'b0, 0, 5'b01000); // BGE
    t(2'b01, 3'b000, 7'b0, 0, 5'b01001); // BEQ
    t(2'b01, 3'b001, 7'b0, 0, 5'b01010); // BNE
    t(2'b01, 3'b100, 7'b0, 0, 5'b01011); // BLT
    // address calculation
    for (int f = 0; f < 8; f++) t(2'b00, 3'(f), 7'($urandom), 1'($urandom), 5'b00000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
