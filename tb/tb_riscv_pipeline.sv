// tb_riscv_pipeline: runs the end-to-end program on the core with an
// instruction memory model, then reads data memory through the read-out port
// and compares it with the independently computed results. Also checks that
// the 18 back-to-back matrix instructions pass the memory stage on 18
// consecutive cycles (one instruction per cycle) and counts the pipeline
// mechanisms: load-use stalls, forwarding from M and W, taken branches and
// jumps, and every matrix operation.
module tb_riscv_pipeline;
  import intellera_pkg::*;
  import intellera_prog_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n;
  logic [31:0] imem_addr, imem_rdata, dbg_rdata;
  logic [9:0]  dbg_addr;
  logic [31:0] prog[$];
  logic [31:0] exp_mem[int];

  riscv_pipeline dut (.clk, .rst_n, .imem_addr, .imem_rdata, .dbg_addr, .dbg_rdata);

  assign imem_rdata = (int'(imem_addr[31:2]) < prog.size()) ? prog[imem_addr[31:2]] : NOP_INSTR;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_stall = 0, n_fwd_m = 0, n_fwd_w = 0, n_branch = 0, n_jump = 0;
  int n_mac[16];
  int first_mac_cycle = -1, last_mac_cycle = -1, n_mac_total = 0;
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_hz.lw_stall) n_stall++;
    if (dut.forward_a == 2'b10 || dut.forward_b == 2'b10) n_fwd_m++;
    if (dut.forward_a == 2'b01 || dut.forward_b == 2'b01) n_fwd_w++;
    if (dut.pc_src_e && dut.ctrl_e.branch) n_branch++;
    if (dut.pc_src_e && dut.ctrl_e.jump) n_jump++;
    if (dut.ctrl_m.mac_ctrl != MAC_NOP) begin
      n_mac[dut.ctrl_m.mac_ctrl]++;
      n_mac_total++;
      if (first_mac_cycle < 0) first_mac_cycle = cyc;
      last_mac_cycle = cyc;
    end
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int stay;
    build(prog);
    expected(exp_mem);
    foreach (n_mac[i]) n_mac[i] = 0;
    rst_n = 1'b0; dbg_addr = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    stay = 0;
    while (stay < 10) begin
      @(posedge clk);
      if (imem_addr == 32'(END_PC)) stay++;
    end
    repeat (5) @(posedge clk);
    foreach (exp_mem[a]) begin
      dbg_addr = 10'(a);
      #1;
      chk(dbg_rdata === exp_mem[a], $sformatf("mem[%0d] = %h, expected %h", a, dbg_rdata, exp_mem[a]));
    end
    $display("cycles=%0d stalls=%0d fwdM=%0d fwdW=%0d branches=%0d jumps=%0d mac_ops=%0d",
             cyc, n_stall, n_fwd_m, n_fwd_w, n_branch, n_jump, n_mac_total);
    chk(n_stall == 50, $sformatf("load-use stalls %0d", n_stall));
    chk(n_fwd_m > 0, "forwarding from memory stage");
    chk(n_fwd_w > 0, "forwarding from write-back stage");
    chk(n_branch == 51, $sformatf("taken branches %0d", n_branch));
    chk(n_jump >= 3, "jumps");
    for (int c = 0; c <= 10; c++) chk(n_mac[c] > 0, $sformatf("matrix op %0d never ran", c));
    chk(n_mac_total == N_MAC_BLOCK, $sformatf("matrix ops %0d", n_mac_total));
    chk(last_mac_cycle - first_mac_cycle + 1 == N_MAC_BLOCK,
        $sformatf("matrix block took %0d cycles", last_mac_cycle - first_mac_cycle + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
