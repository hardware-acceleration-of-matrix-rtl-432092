// tb_mat_addr_gen: checks the 25 element addresses Row + i*Offset + j
// (Offset 0 read as 5) for the design's examples and random fields.
module tb_mat_addr_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] row, offset;
  logic [24:0][9:0] addr;
  mat_addr_gen #(.DIM(5), .AW(10)) dut (.row, .offset, .addr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input int r, input int o);
    int stride;
    row = 10'(r); offset = 10'(o);
    #1;
    stride = (o == 0) ? 5 : o;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        int e = (r + i * stride + j) % 1024;
        checks++;
        if (int'(addr[i*5+j]) != e) begin
          failures++;
          $display("FAIL row=%0d off=%0d (%0d,%0d) got %0d exp %0d", r, o, i, j, addr[i*5+j], e);
        end
      end
  endtask

  initial begin
    @(posedge clk);
    t(400, 5);
    t(425, 5);
    t(500, 0);
    t(1020, 5);   // wraps around the top of memory
    t(0, 1023);
    repeat (200) t($urandom % 1024, $urandom % 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
