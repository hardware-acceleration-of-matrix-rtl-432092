// tb_instr_mem: checks the reset contents (NOPs), writes through the loader
// port and reads through the byte-addressed fetch port.
module tb_instr_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 64;
  logic        rst_n, we;
  logic [31:0] addr, rdata, wdata;
  logic [5:0]  waddr;
  logic [31:0] ref_mem [DEPTH];

  instr_mem #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .addr, .rdata, .we, .waddr, .wdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = 0; waddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = 32'h0000_0013;
      addr = 32'(i * 4); #1;
      checks++;
      if (rdata !== 32'h0000_0013) begin failures++; $display("FAIL reset word %0d", i); end
    end
    repeat (1000) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = $urandom;
      addr = {$urandom} & 32'h0000_00fc;
      #1;
      checks++;
      if (rdata !== ref_mem[addr[7:2]]) begin
        failures++;
        $display("FAIL read %h got %h exp %h", addr, rdata, ref_mem[addr[7:2]]);
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
