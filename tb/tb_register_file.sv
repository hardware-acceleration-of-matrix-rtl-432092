// tb_register_file: random writes and reads against a reference array; checks
// x0, reset clearing and the write-through of a same-cycle read.
module tb_register_file;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, we;
  logic [4:0]  rs1, rs2, rd;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] ref_regs [32];

  register_file dut (.clk, .rst_n, .rs1, .rs2, .rd1, .rd2, .we, .rd, .wd);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; rs1 = 0; rs2 = 0; rd = 0; wd = 0;
    foreach (ref_regs[i]) ref_regs[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); #1; chk(rd1, 32'd0, "after reset");
    end
    repeat (3000) begin
      @(negedge clk);
      we = 1'($urandom); rd = 5'($urandom); wd = $urandom;
      rs1 = 5'($urandom); rs2 = ($urandom % 4 == 0) ? rd : 5'($urandom);
      #1;
      chk(rd1, (rs1 == 0) ? 32'd0 : (we && rs1 == rd) ? wd : ref_regs[rs1], "rd1");
      chk(rd2, (rs2 == 0) ? 32'd0 : (we && rs2 == rd) ? wd : ref_regs[rs2], "rd2");
      @(posedge clk);
      if (we && rd != 0) ref_regs[rd] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
