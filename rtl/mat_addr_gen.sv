// mat_addr_gen: matrix address calculation for the LMAC and STR R
// instructions (the "matrix address calculation" step of the pipeline).
//
// Combinational. A matrix instruction carries a 10-bit Row field (bits 19-10),
// the word address of element (0,0), and a 10-bit Offset field (bits 29-20),
// the distance in words between the starts of consecutive rows. Element
// (i,j), held in register i*DIM+j of the MAC unit, lives at word
// Row + i*Offset + j. An Offset of 0 is read as DIM (rows packed back to
// back), so that a store written without operands stays meaningful. Addresses
// wrap modulo the data memory depth (AW address bits). The formula is this
// design's reading of the Row/Offset fields; the design's own example loads A
// with "Row 400, Offset 5" and B with "Row 425, Offset 5", i.e. two 5x5
// matrices stored one after the other.
// The address of element (0,0) is Row itself, so addr[0] is the row input
// passed straight through.
module mat_addr_gen #(
  parameter int unsigned DIM = 5,
  parameter int unsigned AW  = 10
) (
  input  logic [9:0]                 row,
  input  logic [9:0]                 offset,
  output logic [DIM*DIM-1:0][AW-1:0] addr
);
  logic [AW+10:0] stride;
  assign stride = (offset == 10'd0) ? (AW+11)'(DIM) : (AW+11)'(offset);

  always_comb begin
    for (int i = 0; i < int'(DIM); i++) begin
      for (int j = 0; j < int'(DIM); j++) begin
        addr[i*DIM + j] = AW'((AW+11)'(row) + (AW+11)'(i) * stride + (AW+11)'(j));
      end
    end
  end
endmodule
