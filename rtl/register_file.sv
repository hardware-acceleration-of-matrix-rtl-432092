// register_file: the 32 x 32-bit integer register file of the Intellera core.
//
// Two combinational read ports (rs1, rs2) and one write port written on the
// rising clock edge when we is high. x0 always reads 0 and is never written.
// A read of the register being written in the same cycle returns the new
// value (write-through), so the write-back and decode stages of the pipeline
// can overlap without an extra hazard; this bypass, and clearing all registers
// on reset (rst_n low, synchronous), are this design's own choices.
module register_file #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [4:0]      rs1,
  input  logic [4:0]      rs2,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [4:0]      rd,
  input  logic [XLEN-1:0] wd
);
  logic [XLEN-1:0] regs [32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && rd != 5'd0) begin
      regs[rd] <= wd;
    end
  end

  always_comb begin
    if (rs1 == 5'd0)              rd1 = '0;
    else if (we && rs1 == rd)     rd1 = wd;
    else                          rd1 = regs[rs1];
    if (rs2 == 5'd0)              rd2 = '0;
    else if (we && rs2 == rd)     rd2 = wd;
    else                          rd2 = regs[rs2];
  end
endmodule
