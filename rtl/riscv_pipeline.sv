// riscv_pipeline: the 5-stage pipelined 32-bit RISC-V core with the matrix
// MAC unit.
//
// Stages: fetch (F), decode and register read (D), execute (E), memory (M)
// and write-back (W), separated by pipeline registers. Execute runs the ALU,
// resolves branches and jumps, and also performs the matrix address
// calculation for the matrix instructions (25 word addresses from the Row and
// Offset fields). The memory stage holds the data memory and the MAC unit: a
// LW/SW uses the scalar port; LMAC A/B read 25 words through the matrix port
// into matrix A or B; MAC M/ADD/SUB, SUB MAC and the CLR instructions update
// the MAC unit's registers; STR R writes the 25 result words back. Every
// matrix instruction therefore takes one cycle in the memory stage, in program
// order, so matrix instructions never stall each other. Matrix instructions
// write no integer register.
//
// The hazard unit forwards results from M and W to E, inserts one bubble for
// a load-use dependence, and flushes D and E when a branch or jump is taken
// in E (static not-taken prediction). Ordinary instructions have a latency of
// 5 cycles from fetch to write-back and a throughput of one per cycle; a taken
// branch costs 2 cycles and a load-use dependence 1.
//
// Instruction set: ADD, SUB, MUL, AND, OR, XOR, SLT, SLL, SRL and their
// immediate forms, LW, SW, BEQ, BNE, BLT, BGE (the design's RISC-V list),
// plus JAL, JALR and LUI (this design's additions), and the eleven custom
// matrix instructions (opcode 1110111). The instruction memory sits outside
// the core: imem_addr is the fetch byte address, imem_rdata the word read
// combinationally. dbg_addr/dbg_rdata read data memory words. Reset is
// synchronous and active low; the PC starts at 0.
module riscv_pipeline
  import intellera_pkg::*;
 #(
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter int unsigned DIM        = 5,
  localparam int unsigned DAW       = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic [31:0]    imem_addr,
  input  logic [31:0]    imem_rdata,
  input  logic [DAW-1:0] dbg_addr,
  output logic [31:0]    dbg_rdata
);
  localparam int unsigned NW = DIM * DIM;

  // ---------------- hazard wires ----------------
  logic       stall_f, stall_d, flush_d, flush_e;
  logic [1:0] forward_a, forward_b;
  logic       pc_src_e;
  logic [31:0] pc_target_e;

  // ---------------- fetch ----------------
  logic [31:0] pc_f, pc_plus4_f;
  assign pc_plus4_f = pc_f + 32'd4;
  assign imem_addr  = pc_f;

  always_ff @(posedge clk) begin
    if (!rst_n)        pc_f <= '0;
    else if (!stall_f) pc_f <= pc_src_e ? pc_target_e : pc_plus4_f;
  end

  // ---------------- IF/ID ----------------
  logic [31:0] instr_d, pc_d, pc_plus4_d;
  always_ff @(posedge clk) begin
    if (!rst_n || (flush_d && !stall_d)) begin
      instr_d    <= NOP_INSTR;
      pc_d       <= '0;
      pc_plus4_d <= '0;
    end else if (!stall_d) begin
      instr_d    <= imem_rdata;
      pc_d       <= pc_f;
      pc_plus4_d <= pc_plus4_f;
    end
  end

  // ---------------- decode ----------------
  ctrl_t       ctrl_d;
  logic [4:0]  rs1_d, rs2_d, rd_d;
  logic [31:0] rd1_d, rd2_d, imm_d;
  logic [19:0] mat_field_d;   // {Offset, Row} of a matrix instruction
  logic [31:0] result_w;
  logic [4:0]  rd_w;
  logic        reg_write_w;

  control_unit u_ctrl (.instr(instr_d), .ctrl(ctrl_d));

  assign rs1_d       = (instr_d[6:0] == OP_LUI) ? 5'd0 : instr_d[19:15];
  assign rs2_d       = instr_d[24:20];
  assign rd_d        = instr_d[11:7];
  assign mat_field_d = instr_d[29:10];

  register_file u_rf (
    .clk, .rst_n, .rs1(rs1_d), .rs2(rs2_d), .rd1(rd1_d), .rd2(rd2_d),
    .we(reg_write_w), .rd(rd_w), .wd(result_w)
  );

  imm_extend u_imm (.instr(instr_d[31:7]), .imm_src(ctrl_d.imm_src), .imm(imm_d));

  // ---------------- ID/EX ----------------
  ctrl_t       ctrl_e;
  logic [31:0] rd1_e, rd2_e, imm_e, pc_e, pc_plus4_e;
  logic [4:0]  rs1_e, rs2_e, rd_e;
  logic [19:0] mat_field_e;

  // A bubble: no register write, no memory write, no branch, no matrix op.
  function automatic ctrl_t bubble();
    ctrl_t c;
    c            = '0;
    c.alu_ctrl   = ALU_ADD;
    c.mac_ctrl   = MAC_NOP;
    c.macdm      = MACDM_NONE;
    c.result_src = RES_ALU;
    c.imm_src    = IMM_I;
    return c;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || flush_e) begin
      ctrl_e      <= bubble();
      rd1_e       <= '0;
      rd2_e       <= '0;
      imm_e       <= '0;
      pc_e        <= '0;
      pc_plus4_e  <= '0;
      rs1_e       <= '0;
      rs2_e       <= '0;
      rd_e        <= '0;
      mat_field_e <= '0;
    end else begin
      ctrl_e      <= ctrl_d;
      rd1_e       <= rd1_d;
      rd2_e       <= rd2_d;
      imm_e       <= imm_d;
      pc_e        <= pc_d;
      pc_plus4_e  <= pc_plus4_d;
      rs1_e       <= rs1_d;
      rs2_e       <= rs2_d;
      rd_e        <= rd_d;
      mat_field_e <= mat_field_d;
    end
  end

  // ---------------- execute ----------------
  logic [31:0] src_a_e, src_b_e, write_data_e, alu_result_e;
  logic [31:0] fwd_m;   // value an instruction in M will write back
  logic [NW-1:0][DAW-1:0] mat_addr_e;
  ctrl_t       ctrl_m;
  logic [31:0] alu_result_m, pc_plus4_m;

  assign fwd_m = (ctrl_m.result_src == RES_PC4) ? pc_plus4_m : alu_result_m;

  always_comb begin
    unique case (forward_a)
      2'b10:   src_a_e = fwd_m;
      2'b01:   src_a_e = result_w;
      default: src_a_e = rd1_e;
    endcase
    unique case (forward_b)
      2'b10:   write_data_e = fwd_m;
      2'b01:   write_data_e = result_w;
      default: write_data_e = rd2_e;
    endcase
  end

  assign src_b_e = ctrl_e.alu_src ? imm_e : write_data_e;

  alu u_alu (
    .a(src_a_e), .b(src_b_e), .alu_ctrl(ctrl_e.alu_ctrl),
    .result(alu_result_e)
  );

  assign pc_src_e    = ctrl_e.jump || (ctrl_e.branch && alu_result_e[0]);
  assign pc_target_e = ctrl_e.jalr ? {alu_result_e[31:1], 1'b0} : pc_e + imm_e;

  mat_addr_gen #(.DIM(DIM), .AW(DAW)) u_mag (
    .row(mat_field_e[9:0]), .offset(mat_field_e[19:10]), .addr(mat_addr_e)
  );

  // ---------------- EX/MEM ----------------
  logic [31:0] write_data_m;
  logic [4:0]  rd_m;
  logic [NW-1:0][DAW-1:0] mat_addr_m;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl_m       <= bubble();
      alu_result_m <= '0;
      write_data_m <= '0;
      pc_plus4_m   <= '0;
      rd_m         <= '0;
      mat_addr_m   <= '0;
    end else begin
      ctrl_m       <= ctrl_e;
      alu_result_m <= alu_result_e;
      write_data_m <= write_data_e;
      pc_plus4_m   <= pc_plus4_e;
      rd_m         <= rd_e;
      mat_addr_m   <= mat_addr_e;
    end
  end

  // ---------------- memory: data memory and MAC unit ----------------
  logic [31:0] read_data_m;
  logic [NW-1:0][31:0] mat_rdata_m, mat_r_m;

  data_mem #(.DEPTH(DMEM_DEPTH), .DIM(DIM)) u_dmem (
    .clk, .rst_n,
    .we(ctrl_m.mem_write), .addr(alu_result_m), .wdata(write_data_m), .rdata(read_data_m),
    .macdm(ctrl_m.macdm), .mat_addr(mat_addr_m), .mat_rdata(mat_rdata_m), .mat_wdata(mat_r_m),
    .dbg_addr, .dbg_rdata
  );

  mac_unit #(.DIM(DIM), .W(32)) u_mac (
    .clk, .rst_n, .mac_ctrl(ctrl_m.mac_ctrl), .mat_in(mat_rdata_m), .r_out(mat_r_m)
  );

  // ---------------- MEM/WB ----------------
  res_src_e    result_src_w;
  logic [31:0] alu_result_w, read_data_w, pc_plus4_w;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg_write_w  <= 1'b0;
      result_src_w <= RES_ALU;
      alu_result_w <= '0;
      read_data_w  <= '0;
      pc_plus4_w   <= '0;
      rd_w         <= '0;
    end else begin
      reg_write_w  <= ctrl_m.reg_write;
      result_src_w <= ctrl_m.result_src;
      alu_result_w <= alu_result_m;
      read_data_w  <= read_data_m;
      pc_plus4_w   <= pc_plus4_m;
      rd_w         <= rd_m;
    end
  end

  // ---------------- write-back ----------------
  always_comb begin
    unique case (result_src_w)
      RES_MEM: result_w = read_data_w;
      RES_PC4: result_w = pc_plus4_w;
      default: result_w = alu_result_w;
    endcase
  end

  // ---------------- hazard unit ----------------
  hazard_unit u_hz (
    .rs1_d, .rs2_d, .rs1_e, .rs2_e, .rd_e,
    .load_e(ctrl_e.result_src == RES_MEM), .pc_src_e,
    .rd_m, .reg_write_m(ctrl_m.reg_write), .rd_w, .reg_write_w,
    .forward_a, .forward_b, .stall_f, .stall_d, .flush_d, .flush_e
  );

  // A matrix store and a scalar store are never in the memory stage together.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(ctrl_m.mem_write && ctrl_m.macdm != MACDM_NONE));
endmodule
