// tb_data_mem: random scalar loads/stores, matrix reads (LMAC) and matrix
// stores (STR R) at random address sets, checked against a reference array.
module tb_data_mem;
  import intellera_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 1024;
  logic        rst_n, we;
  logic [31:0] addr, wdata, rdata, dbg_rdata;
  macdm_e      macdm;
  logic [24:0][9:0]  mat_addr;
  logic [24:0][31:0] mat_rdata, mat_wdata;
  logic [9:0]  dbg_addr;
  logic [31:0] ref_mem [DEPTH];

  data_mem #(.DEPTH(DEPTH), .DIM(5)) dut (.clk, .rst_n, .we, .addr, .wdata, .rdata,
    .macdm, .mat_addr, .mat_rdata, .mat_wdata, .dbg_addr, .dbg_rdata);

  initial begin
    repeat (50000) @(posedge clk);
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
    rst_n = 1'b0; we = 1'b0; addr = 0; wdata = 0; macdm = MACDM_NONE;
    mat_addr = '0; mat_wdata = '0; dbg_addr = 0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2000) begin
      automatic int kind = $urandom % 4;
      automatic int base = $urandom % DEPTH;
      automatic int stride = 1 + $urandom % 40;
      @(negedge clk);
      we = 1'b0; macdm = MACDM_NONE;
      for (int k = 0; k < 25; k++) begin
        mat_addr[k]  = 10'((base + (k / 5) * stride + (k % 5)) % DEPTH);
        mat_wdata[k] = $urandom;
      end
      addr = {20'($urandom), 10'($urandom), 2'b00};
      wdata = $urandom;
      dbg_addr = 10'($urandom);
      case (kind)
        0: we = 1'b1;
        1: macdm = MACDM_STORE_R;
        2: macdm = MACDM_LOAD_A;
        default: macdm = MACDM_LOAD_B;
      endcase
      #1;
      chk(rdata, ref_mem[addr[11:2]], "scalar read");
      chk(dbg_rdata, ref_mem[dbg_addr], "read-out port");
      for (int k = 0; k < 25; k++) chk(mat_rdata[k], ref_mem[mat_addr[k]], "matrix read");
      @(posedge clk);
      if (we) ref_mem[addr[11:2]] = wdata;
      if (macdm == MACDM_STORE_R) for (int k = 0; k < 25; k++) ref_mem[mat_addr[k]] = mat_wdata[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
