// tb_uart_tx: transmits random bytes at CLKS_PER_BIT = 16 and decodes the
// serial line in the testbench, checking start bit, data bits, stop bit, the
// bit time and the busy flag.
module tb_uart_tx;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CPB = 16;
  logic rst_n, start, txd, busy;
  logic [7:0] data;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .start, .data, .txd, .busy);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    chk(txd === 1'b1 && busy === 1'b0, "idle high");
    repeat (200) begin
      automatic logic [7:0] b = 8'($urandom);
      logic [7:0] got;
      int n;
      @(negedge clk); start = 1'b1; data = b;
      @(negedge clk); start = 1'b0; data = 8'($urandom);
      chk(busy === 1'b1, "busy");
      // wait to the middle of the start bit
      repeat (CPB / 2 - 1) @(negedge clk);
      chk(txd === 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(negedge clk);
      chk(txd === 1'b1, "stop bit");
      chk(got === b, $sformatf("data %h vs %h", got, b));
      n = 0;
      while (busy && n < 2 * CPB) begin @(negedge clk); n++; end
      chk(!busy && n <= CPB / 2 + 2, "frame length");
      repeat ($urandom % 5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
