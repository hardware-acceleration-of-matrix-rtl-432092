// tb_imm_extend: encodes random immediates with the testbench's own encoders
// and checks that every format decodes back to the same value.
module tb_imm_extend;
  import intellera_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] ins, imm;
  imm_src_e    src;
  imm_extend dut (.instr(ins[31:7]), .imm_src(src), .imm);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input imm_src_e s, input logic [31:0] word, input int exp);
    ins = word; src = s;
    #1;
    checks++;
    if (imm !== 32'(exp)) begin
      failures++;
      $display("FAIL src=%0d ins=%h got %h exp %h", s, word, imm, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    repeat (300) begin
      automatic int v12 = $signed(12'($urandom));
      automatic int v13 = $signed({12'($urandom), 1'b0});
      automatic int v21 = $signed({20'($urandom), 1'b0});
      automatic logic [19:0] u = 20'($urandom);
      t(IMM_I, ADDI(5'($urandom), 5'($urandom), v12), v12);
      t(IMM_S, SW(5'($urandom), 5'($urandom), v12), v12);
      t(IMM_B, BEQ(5'($urandom), 5'($urandom), v13), v13);
      t(IMM_J, JAL(5'($urandom), v21), v21);
      t(IMM_U, LUI(5'($urandom), u), int'({u, 12'b0}));
    end
    t(IMM_I, ADDI(1, 0, -2048), -2048);
    t(IMM_B, BGE(2, 1, -56), -56);
    t(IMM_J, JAL(0, -4), -4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
