// mac_unit: the matrix MAC unit, the accelerator at the heart of the design.
//
// It holds three banks of DIM*DIM registers of W bits: matrix A, matrix B and
// the result matrix R (25 x 32 bits each at the default DIM = 5). Register
// k = i*DIM + j holds element (i,j) (row-major). The 4-bit MACControl input
// selects what happens at the next rising clock edge:
//   LMAC A / LMAC B : A or B <= the 25 words on mat_in (from data memory)
//   CLR A/B/R/ALL   : clear the named bank(s)
//   MAC M           : R <= A * B   (matrix product, sum of DIM products each)
//   MAC ADD         : R <= A + B
//   MAC SUB         : R <= A - B
//   SUB MAC         : R <= B - A
//   STR R, NOP      : no change (R is always driven on r_out, and data memory
//                     stores it when MACDM says so)
// Every operation completes in one clock cycle; the product is computed by
// DIM*DIM*DIM parallel multipliers and adder trees. Arithmetic is two's-
// complement integer, wrapping to W bits; the design calls its data fixed
// point without giving a scaling, so integer (no fractional bits) is this
// design's choice. Reset (rst_n low, synchronous) clears all banks, also a
// choice of this design.
module mac_unit
  import intellera_pkg::*;
 #(
  parameter int unsigned DIM = 5,
  parameter int unsigned W   = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  mac_ctrl_e                 mac_ctrl,
  input  logic [DIM*DIM-1:0][W-1:0] mat_in,
  output logic [DIM*DIM-1:0][W-1:0] r_out
);
  logic [DIM*DIM-1:0][W-1:0] mat_a, mat_b, mat_r;
  logic [DIM*DIM-1:0][W-1:0] prod, sum, diff_ab, diff_ba;

  always_comb begin
    for (int i = 0; i < int'(DIM); i++) begin
      for (int j = 0; j < int'(DIM); j++) begin
        prod[i*DIM + j] = '0;
        for (int k = 0; k < int'(DIM); k++) begin
          prod[i*DIM + j] += mat_a[i*DIM + k] * mat_b[k*DIM + j];
        end
      end
    end
    for (int k = 0; k < int'(DIM*DIM); k++) begin
      sum[k]     = mat_a[k] + mat_b[k];
      diff_ab[k] = mat_a[k] - mat_b[k];
      diff_ba[k] = mat_b[k] - mat_a[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mat_a <= '0;
      mat_b <= '0;
      mat_r <= '0;
    end else begin
      unique case (mac_ctrl)
        MAC_LOAD_A:  mat_a <= mat_in;
        MAC_LOAD_B:  mat_b <= mat_in;
        MAC_CLR_A:   mat_a <= '0;
        MAC_CLR_B:   mat_b <= '0;
        MAC_CLR_R:   mat_r <= '0;
        MAC_CLR_ALL: begin mat_a <= '0; mat_b <= '0; mat_r <= '0; end
        MAC_MUL:     mat_r <= prod;
        MAC_ADD:     mat_r <= sum;
        MAC_SUB:     mat_r <= diff_ab;
        MAC_RSUB:    mat_r <= diff_ba;
        default:     ;
      endcase
    end
  end

  assign r_out = mat_r;
endmodule
