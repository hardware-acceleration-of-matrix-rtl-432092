// tb_mac_decoder: checks MACControl and MACDM for every entry of the matrix
// instruction table, for undefined combinations and for non-matrix
// instructions.
module tb_mac_decoder;
  import intellera_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] funct3;
  logic       mac_op;
  logic [1:0] macop;
  mac_ctrl_e  mac_ctrl;
  macdm_e     macdm;
  mac_decoder dut (.funct3, .mac_op, .macop, .mac_ctrl, .macdm);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values per {macop, funct3}: {ctrl, dm}
  function automatic logic [5:0] expect_of(input logic m, input logic [1:0] op, input logic [2:0] f3);
    if (!m) return {4'b1111, 2'b00};
    case ({op, f3})
      5'b00_000: return {4'b0000, 2'b01};  // LMAC A
      5'b00_001: return {4'b0001, 2'b10};  // LMAC B
      5'b01_000: return {4'b0010, 2'b00};  // CLR A
      5'b01_001: return {4'b0011, 2'b00};  // CLR B
      5'b01_010: return {4'b0100, 2'b00};  // CLR R
      5'b01_011: return {4'b0101, 2'b00};  // CLR ALL
      5'b10_000: return {4'b0110, 2'b00};  // MAC M
      5'b10_001: return {4'b0111, 2'b00};  // MAC ADD
      5'b10_010: return {4'b1000, 2'b00};  // MAC SUB
      5'b10_011: return {4'b1001, 2'b00};  // SUB MAC
      5'b11_000: return {4'b1010, 2'b11};  // STR R
      default:   return {4'b1111, 2'b00};
    endcase
  endfunction

  initial begin
    @(posedge clk);
    for (int m = 0; m < 2; m++)
      for (int op = 0; op < 4; op++)
        for (int f = 0; f < 8; f++) begin
          logic [5:0] e;
          mac_op = 1'(m); macop = 2'(op); funct3 = 3'(f);
          #1;
          e = expect_of(1'(m), 2'(op), 3'(f));
          checks++;
          if ({mac_ctrl, macdm} !== e) begin
            failures++;
            $display("FAIL m=%0d op=%b f3=%b got %b/%b exp %b", m, op[1:0], f[2:0], mac_ctrl, macdm, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
