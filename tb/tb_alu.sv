// tb_alu: self-checking test of the ALU. Random and corner operands for every
// ALU control code, compared with results worked out in the testbench.
module tb_alu;
  import intellera_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a, b, result;
  alu_ctrl_e   ctrl;
  alu dut (.a, .b, .alu_ctrl(ctrl), .result);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input alu_ctrl_e c, input logic [31:0] x, y);
    longint sx = longint'($signed(x));
    longint sy = longint'($signed(y));
    logic [63:0] p;
    case (c)
      ALU_ADD: return 32'((64'(x) + 64'(y)) & 64'hffff_ffff);
      ALU_SUB: return 32'((64'(x) + 64'(~y) + 64'd1) & 64'hffff_ffff);
      ALU_MUL: begin p = 64'(x) * 64'(y); return p[31:0]; end
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_SLL: return 32'((64'(x) << y[4:0]) & 64'hffff_ffff);
      ALU_SRL: return 32'(64'(x) >> y[4:0]);
      ALU_SLT, ALU_BLT: return (sx < sy) ? 32'd1 : 32'd0;
      ALU_BGE: return (sx >= sy) ? 32'd1 : 32'd0;
      ALU_BEQ: return (x == y) ? 32'd1 : 32'd0;
      ALU_BNE: return (x != y) ? 32'd1 : 32'd0;
      default: return 32'hdead_beef;
    endcase
  endfunction

  alu_ctrl_e codes[13] = '{ALU_ADD, ALU_SUB, ALU_MUL, ALU_AND, ALU_OR, ALU_XOR,
                           ALU_SLL, ALU_SRL, ALU_BGE, ALU_BEQ, ALU_BNE, ALU_BLT, ALU_SLT};
  logic [31:0] corner[6] = '{32'd0, 32'd1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'd5};

  task automatic check(input alu_ctrl_e c, input logic [31:0] x, y);
    logic [31:0] exp;
    ctrl = c; a = x; b = y;
    #1;
    exp = model(c, x, y);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL ctrl=%0d a=%h b=%h got %h exp %h", c, x, y, result, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    foreach (codes[c]) begin
      foreach (corner[i]) foreach (corner[j]) check(codes[c], corner[i], corner[j]);
      repeat (200) check(codes[c], $urandom, $urandom);
      repeat (50) begin
        automatic logic [31:0] v = $urandom;
        check(codes[c], v, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
