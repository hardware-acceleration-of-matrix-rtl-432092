// tb_intellera_top: end-to-end test of the complete processor at its default
// parameters. A host model sends the test program over the UART line (four
// bytes per instruction, least significant first, 8N1 at the default bit time
// of 2891 clock cycles) while prog_mode is high, and decodes the echo on
// uart_txd. Then prog_mode is released, the core runs the program, and the
// data memory is read back through the read-out port and compared with the
// independently computed results. It also counts each mechanism of the design
// (UART byte reception and echo, instruction assembly, load-use stall,
// forwarding from M and W, taken branch flush, jump flush, every matrix
// operation) and fails if one never happened, and checks that the 18
// back-to-back matrix instructions take 18 cycles in the memory stage.
module tb_intellera_top;
  import intellera_pkg::*;
  import intellera_prog_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CPB = 2891;   // the top's default bit time

  logic        rst_n, prog_mode, uart_rxd, uart_txd;
  logic [9:0]  dbg_addr;
  logic [31:0] dbg_rdata;
  logic [8:0]  loaded_words;
  logic [31:0] prog[$];
  logic [31:0] exp_mem[int];
  logic [7:0]  sent_q[$];

  intellera_top dut (.clk, .rst_n, .prog_mode, .uart_rxd, .uart_txd, .dbg_addr, .dbg_rdata,
                     .loaded_words);

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- host UART transmitter ----------------
  task automatic send_byte(input logic [7:0] b);
    sent_q.push_back(b);
    uart_rxd <= 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd <= b[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rxd <= 1'b1;
    repeat (2 * CPB) @(posedge clk);   // stop bit and one idle bit
  endtask

  // ---------------- host UART receiver (echo check) ----------------
  int n_echo = 0;
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      chk(uart_txd === 1'b0, "echo start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      chk(uart_txd === 1'b1, "echo stop bit");
      chk(sent_q.size() > 0 && b === sent_q[0], $sformatf("echo byte %h", b));
      if (sent_q.size() > 0) void'(sent_q.pop_front());
      n_echo++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_rx = 0, n_words = 0, n_stall = 0, n_fwd_m = 0, n_fwd_w = 0, n_branch = 0, n_jump = 0;
  int n_mac[16];
  int first_mac_cycle = -1, last_mac_cycle = -1, n_mac_total = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.rx_valid) n_rx++;
    if (rst_n && dut.imem_we) n_words++;
    if (dut.core_rst_n) begin
      if (dut.u_core.u_hz.lw_stall) n_stall++;
      if (dut.u_core.forward_a == 2'b10 || dut.u_core.forward_b == 2'b10) n_fwd_m++;
      if (dut.u_core.forward_a == 2'b01 || dut.u_core.forward_b == 2'b01) n_fwd_w++;
      if (dut.u_core.pc_src_e && dut.u_core.ctrl_e.branch) n_branch++;
      if (dut.u_core.pc_src_e && dut.u_core.ctrl_e.jump) n_jump++;
      if (dut.u_core.ctrl_m.mac_ctrl != MAC_NOP) begin
        n_mac[dut.u_core.ctrl_m.mac_ctrl]++;
        n_mac_total++;
        if (first_mac_cycle < 0) first_mac_cycle = cyc;
        last_mac_cycle = cyc;
      end
    end
  end

  initial begin
    int stay;
    build(prog);
    expected(exp_mem);
    foreach (n_mac[i]) n_mac[i] = 0;
    rst_n = 1'b0; prog_mode = 1'b0; uart_rxd = 1'b1; dbg_addr = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    prog_mode <= 1'b1;
    repeat (CPB) @(posedge clk);
    foreach (prog[i]) for (int b = 0; b < 4; b++) send_byte(prog[i][8*b +: 8]);
    repeat (12 * CPB) @(posedge clk);   // last echo completes
    chk(int'(loaded_words) == prog.size(), $sformatf("loaded %0d words", loaded_words));
    for (int i = 0; i < prog.size(); i++)
      chk(dut.u_imem.mem[i] === prog[i], $sformatf("instruction memory word %0d", i));
    prog_mode <= 1'b0;
    stay = 0;
    while (stay < 10) begin
      @(posedge clk);
      if (dut.imem_addr == 32'(END_PC)) stay++;
    end
    repeat (5) @(posedge clk);
    foreach (exp_mem[a]) begin
      dbg_addr = 10'(a);
      #1;
      chk(dbg_rdata === exp_mem[a], $sformatf("mem[%0d] = %h, expected %h", a, dbg_rdata, exp_mem[a]));
    end
    $display("rx=%0d echo=%0d words=%0d stalls=%0d fwdM=%0d fwdW=%0d branches=%0d jumps=%0d mac_ops=%0d",
             n_rx, n_echo, n_words, n_stall, n_fwd_m, n_fwd_w, n_branch, n_jump, n_mac_total);
    chk(n_rx == 4 * prog.size(), "bytes received");
    chk(n_echo == 4 * prog.size(), "bytes echoed");
    chk(n_words == prog.size(), "instructions assembled");
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
