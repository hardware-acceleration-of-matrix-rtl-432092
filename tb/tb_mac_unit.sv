// tb_mac_unit: runs every MACControl operation on random matrices and checks
// R against a reference model (matrix product, sum and both differences).
// Each operation must complete in the clock cycle it is issued.
module tb_mac_unit;
  import intellera_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  mac_ctrl_e ctrl;
  logic [24:0][31:0] mat_in, r_out;
  logic [31:0] ma [25], mb [25], mr [25];

  mac_unit #(.DIM(5), .W(32)) dut (.clk, .rst_n, .mac_ctrl(ctrl), .mat_in, .r_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input mac_ctrl_e c);
    @(negedge clk);
    ctrl = c;
    for (int k = 0; k < 25; k++) mat_in[k] = ($urandom % 3 == 0) ? $urandom : 32'($signed(8'($urandom)));
    @(posedge clk);
    // reference model update
    case (c)
      MAC_LOAD_A:  for (int k = 0; k < 25; k++) ma[k] = mat_in[k];
      MAC_LOAD_B:  for (int k = 0; k < 25; k++) mb[k] = mat_in[k];
      MAC_CLR_A:   foreach (ma[k]) ma[k] = 0;
      MAC_CLR_B:   foreach (mb[k]) mb[k] = 0;
      MAC_CLR_R:   foreach (mr[k]) mr[k] = 0;
      MAC_CLR_ALL: begin foreach (ma[k]) ma[k] = 0; foreach (mb[k]) mb[k] = 0; foreach (mr[k]) mr[k] = 0; end
      MAC_MUL: for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
                 longint acc = 0;
                 for (int k = 0; k < 5; k++) acc += longint'(ma[i*5+k]) * longint'(mb[k*5+j]);
                 mr[i*5+j] = 32'(acc);
               end
      MAC_ADD:  foreach (mr[k]) mr[k] = ma[k] + mb[k];
      MAC_SUB:  foreach (mr[k]) mr[k] = ma[k] - mb[k];
      MAC_RSUB: foreach (mr[k]) mr[k] = mb[k] - ma[k];
      default: ;
    endcase
    #1;
    ctrl = MAC_NOP;
    for (int k = 0; k < 25; k++) begin
      checks++;
      if (r_out[k] !== mr[k]) begin
        failures++;
        $display("FAIL op %0d R[%0d] got %h exp %h", c, k, r_out[k], mr[k]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; ctrl = MAC_NOP; mat_in = '0;
    foreach (ma[k]) begin ma[k] = 0; mb[k] = 0; mr[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (40) begin
      issue(MAC_LOAD_A); issue(MAC_LOAD_B);
      issue(MAC_MUL);  issue(MAC_STR_R);
      issue(MAC_ADD);  issue(MAC_SUB);  issue(MAC_RSUB);
      issue(MAC_CLR_A); issue(MAC_ADD);        // R = B
      issue(MAC_LOAD_A); issue(MAC_CLR_B); issue(MAC_RSUB); // R = -A
      issue(MAC_CLR_R); issue(MAC_NOP);
      issue(MAC_LOAD_B); issue(MAC_CLR_ALL); issue(MAC_MUL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
