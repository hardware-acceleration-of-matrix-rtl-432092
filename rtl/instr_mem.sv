// instr_mem: instruction memory of the Intellera core.
//
// DEPTH 32-bit words. The fetch port is combinational: addr is the byte
// address of the program counter and rdata the word at addr[..:2]. The write
// port, used by the UART instruction loader, writes wdata to word waddr on
// the rising clock edge when we is high. The memory is cleared to NOPs
// (addi x0,x0,0) on reset (rst_n low, synchronous), so an empty memory runs
// harmlessly. DEPTH = 256 words is this design's choice; no size is given.
module instr_mem #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   addr,
  output logic [31:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= 32'h0000_0013;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
