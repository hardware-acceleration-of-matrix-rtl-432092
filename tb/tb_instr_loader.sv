// tb_instr_loader: feeds bytes with random gaps and checks that each group of
// four (least significant byte first) is written as one word to consecutive
// addresses, and that dropping enable restarts at address 0.
module tb_instr_loader;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, enable, byte_valid, imem_we;
  logic [7:0] byte_in;
  logic [7:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic [8:0] count;
  logic [31:0] exp_q[$];
  int exp_addr;

  instr_loader #(.AW(8)) dut (.clk, .rst_n, .enable, .byte_in, .byte_valid,
                              .imem_we, .imem_waddr, .imem_wdata, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && imem_we) begin
    checks++;
    if (exp_q.size() == 0 || imem_wdata !== exp_q[0] || int'(imem_waddr) != exp_addr) begin
      failures++;
      $display("FAIL write %h @%0d exp @%0d", imem_wdata, imem_waddr, exp_addr);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    exp_addr++;
  end

  task automatic send_word(input logic [31:0] w);
    exp_q.push_back(w);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); byte_valid = 1'b1; byte_in = w[8*b +: 8];
      @(negedge clk); byte_valid = 1'b0;
      repeat ($urandom % 4) @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0; enable = 1'b0; byte_valid = 1'b0; byte_in = 0; exp_addr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; enable = 1'b1;
    repeat (40) send_word($urandom);
    repeat (3) @(negedge clk);
    checks++;
    if (count != 9'd40) begin failures++; $display("FAIL count %0d", count); end
    // bytes while disabled are ignored; a new loading pass starts at 0
    enable = 1'b0;
    @(negedge clk); byte_valid = 1'b1; byte_in = 8'h11;
    @(negedge clk); byte_valid = 1'b0;
    enable = 1'b1; exp_addr = 0;
    repeat (5) send_word($urandom);
    repeat (3) @(negedge clk);
    checks++;
    if (count != 9'd5 || exp_q.size() != 0) begin failures++; $display("FAIL second loading pass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
