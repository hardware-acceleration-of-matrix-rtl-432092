// hazard_unit: data and control hazard handling of the 5-stage pipeline.
//
// Combinational. Data hazards: a source register of the instruction in
// execute (rs1_e, rs2_e) that matches the destination of an older instruction
// still in the memory (rd_m) or write-back (rd_w) stage is forwarded from
// there (forward_a/b: 00 register file, 10 memory stage, 01 write-back stage;
// the younger one wins; x0 is never forwarded). A load followed directly by a
// user of its result cannot be forwarded in time: the unit then stalls fetch
// and decode for one cycle and flushes execute (a bubble). Control hazards:
// branches and jumps are resolved in execute and the pipeline predicts "not
// taken"; when pc_src_e says the branch/jump is taken, the two younger
// instructions in decode and execute are flushed. Forwarding, the stall and
// the flush are the classic scheme for this pipeline; the static
// "not taken" policy is this design's choice.
// flush_d is pc_src_e itself: a taken branch always empties decode.
module hazard_unit (
  input  logic [4:0] rs1_d,
  input  logic [4:0] rs2_d,
  input  logic [4:0] rs1_e,
  input  logic [4:0] rs2_e,
  input  logic [4:0] rd_e,
  input  logic       load_e,      // instruction in execute is a load
  input  logic       pc_src_e,    // taken branch or jump in execute
  input  logic [4:0] rd_m,
  input  logic       reg_write_m,
  input  logic [4:0] rd_w,
  input  logic       reg_write_w,
  output logic [1:0] forward_a,
  output logic [1:0] forward_b,
  output logic       stall_f,
  output logic       stall_d,
  output logic       flush_d,
  output logic       flush_e
);
  logic lw_stall;

  always_comb begin
    if (reg_write_m && rd_m != 5'd0 && rd_m == rs1_e)      forward_a = 2'b10;
    else if (reg_write_w && rd_w != 5'd0 && rd_w == rs1_e) forward_a = 2'b01;
    else                                                   forward_a = 2'b00;
    if (reg_write_m && rd_m != 5'd0 && rd_m == rs2_e)      forward_b = 2'b10;
    else if (reg_write_w && rd_w != 5'd0 && rd_w == rs2_e) forward_b = 2'b01;
    else                                                   forward_b = 2'b00;
  end

  assign lw_stall = load_e && rd_e != 5'd0 && (rd_e == rs1_d || rd_e == rs2_d);
  assign stall_f  = lw_stall;
  assign stall_d  = lw_stall;
  assign flush_d  = pc_src_e;
  assign flush_e  = lw_stall || pc_src_e;
endmodule
