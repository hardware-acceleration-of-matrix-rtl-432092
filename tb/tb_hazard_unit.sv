// tb_hazard_unit: random register numbers and control inputs, checked against
// the forwarding priority (memory stage before write-back, never x0), the
// load-use stall and the branch flush rules.
module tb_hazard_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] rs1_d, rs2_d, rs1_e, rs2_e, rd_e, rd_m, rd_w;
  logic load_e, pc_src_e, reg_write_m, reg_write_w;
  logic [1:0] forward_a, forward_b;
  logic stall_f, stall_d, flush_d, flush_e;

  hazard_unit dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] fwd(input logic [4:0] rs);
    if (rs != 0 && reg_write_m && rd_m == rs) return 2'b10;
    if (rs != 0 && reg_write_w && rd_w == rs) return 2'b01;
    return 2'b00;
  endfunction

  initial begin
    @(posedge clk);
    repeat (5000) begin
      logic stall;
      // small register range so that matches are frequent
      {rs1_d, rs2_d, rs1_e, rs2_e} = {5'($urandom % 4), 5'($urandom % 4), 5'($urandom % 4), 5'($urandom % 4)};
      {rd_e, rd_m, rd_w} = {5'($urandom % 4), 5'($urandom % 4), 5'($urandom % 4)};
      {load_e, reg_write_m, reg_write_w} = 3'($urandom);
      pc_src_e = load_e ? 1'b0 : 1'($urandom);
      #1;
      stall = load_e && rd_e != 0 && (rd_e == rs1_d || rd_e == rs2_d);
      checks++;
      if (forward_a !== fwd(rs1_e) || forward_b !== fwd(rs2_e) || stall_f !== stall ||
          stall_d !== stall || flush_d !== pc_src_e || flush_e !== (stall || pc_src_e)) begin
        failures++;
        $display("FAIL fa=%b fb=%b sf=%b sd=%b fd=%b fe=%b", forward_a, forward_b, stall_f,
                 stall_d, flush_d, flush_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
