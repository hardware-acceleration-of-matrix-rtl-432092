// data_mem: data memory of the Intellera core, with matrix transfer ports.
//
// DEPTH 32-bit words. Scalar port for LW/SW: addr is a byte address, the word
// at addr[..:2] is read combinationally (rdata) and written with wdata on the
// rising edge when we is high. Matrix port, selected by the 2-bit MACDM code
// from the MAC decoder: 25 (DIM*DIM) word addresses mat_addr come from the
// matrix address calculation; mat_rdata returns the 25 words at those
// addresses combinationally (used by LMAC A/B, MACDM 01/10), and when MACDM
// is 11 (STR R) the 25 words of mat_wdata are written to them on the rising
// edge. A third, read-only port (dbg_addr/dbg_rdata, word address) lets the
// surrounding system read results out; it is this design's addition.
// The memory is cleared on reset (rst_n low, synchronous). DEPTH = 1024 words
// is this design's choice, matching the 10-bit Row field of the matrix
// instructions. If a matrix store and a scalar store hit the same word in the
// same cycle the matrix store wins (cannot happen in the pipeline, where one
// instruction is in the memory stage at a time).
module data_mem
  import intellera_pkg::*;
 #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned DIM   = 5,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // scalar port
  input  logic                       we,
  input  logic [31:0]                addr,
  input  logic [31:0]                wdata,
  output logic [31:0]                rdata,
  // matrix port
  input  macdm_e                     macdm,
  input  logic [DIM*DIM-1:0][AW-1:0] mat_addr,
  output logic [DIM*DIM-1:0][31:0]   mat_rdata,
  input  logic [DIM*DIM-1:0][31:0]   mat_wdata,
  // read-out port
  input  logic [AW-1:0]              dbg_addr,
  output logic [31:0]                dbg_rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (we) mem[addr[AW+1:2]] <= wdata;
      if (macdm == MACDM_STORE_R) begin
        for (int k = 0; k < int'(DIM*DIM); k++) mem[mat_addr[k]] <= mat_wdata[k];
      end
    end
  end

  assign rdata     = mem[addr[AW+1:2]];
  assign dbg_rdata = mem[dbg_addr];

  always_comb begin
    for (int k = 0; k < int'(DIM*DIM); k++) mat_rdata[k] = mem[mat_addr[k]];
  end
endmodule
