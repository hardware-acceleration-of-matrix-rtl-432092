// tb_uart_rx: sends random bytes as 8N1 frames at CLKS_PER_BIT = 16 and
// checks each received byte, a frame with a bad stop bit being dropped, and
// the position of the valid pulse (about 9.5 bit times after the start edge).
module tb_uart_rx;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CPB = 16;
  logic rst_n, rxd, valid;
  logic [7:0] data;
  logic [7:0] q[$];
  int sent_cycle, valid_count;
  longint cyc = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .data, .valid);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    @(posedge clk); rxd <= 1'b0; sent_cycle = int'(cyc);
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd <= b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd <= stop;
    repeat (CPB) @(posedge clk);
    rxd <= 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && valid) begin
    int lat;
    lat = int'(cyc) - sent_cycle;
    valid_count++;
    checks++;
    if (q.size() == 0 || data !== q[0]) begin
      failures++;
      $display("FAIL got %h", data);
    end
    if (q.size() != 0) void'(q.pop_front());
    checks++;
    if (lat < 9 * CPB || lat > 10 * CPB + 4) begin
      failures++;
      $display("FAIL valid after %0d cycles", lat);
    end
  end

  initial begin
    rst_n = 1'b0; rxd = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    repeat (200) begin
      automatic logic [7:0] b = 8'($urandom);
      q.push_back(b);
      send(b, 1'b1);
    end
    send(8'h5a, 1'b0);   // framing error: must be dropped
    q.push_back(8'hc3);
    send(8'hc3, 1'b1);
    repeat (4 * CPB) @(posedge clk);
    checks++;
    if (valid_count != 201 || q.size() != 0) begin
      failures++;
      $display("FAIL received %0d bytes, %0d left", valid_count, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
