// intellera_prog_pkg: the end-to-end test program for the Intellera core and
// its expected results, worked out here independently of the RTL.
//
// The program (1) fills 50 data words from address 400 in a loop that
// exercises a load-use stall, forwarding and a taken backward branch, (2)
// runs every matrix instruction on A = words 400..424 and B = words 425..449
// (the layout of the design's own "LMAC A 400,5 / LMAC B 425,5" example),
// storing the results with STR R, including strided load/store, and (3) runs
// the remaining integer instructions (JAL, JALR, LUI, shifts, SLT, AND, OR,
// SUB, taken and not-taken branches) and stores the registers from word 800.
package intellera_prog_pkg;
  import rv_asm_pkg::*;

  localparam int N_MAC_BLOCK = 18;  // consecutive matrix instructions
  localparam int MAC_BLOCK_START = 13;

  function automatic void build(ref logic [31:0] p[$]);
    p.delete();
    p.push_back(ADDI(1, 0, 1600));   // 0  x1 = byte address of word 400
    p.push_back(ADDI(2, 0, 50));     // 1  count
    p.push_back(ADDI(3, 0, 3));      // 2  seed
    p.push_back(ADDI(4, 0, -7));     // 3
    p.push_back(ADDI(5, 0, 3));      // 4
    p.push_back(SW(3, 1, 0));        // 5  loop:
    p.push_back(LW(6, 1, 0));        // 6
    p.push_back(ADD(3, 6, 4));       // 7  load-use
    p.push_back(MUL(3, 3, 5));       // 8
    p.push_back(XOR(3, 3, 2));       // 9
    p.push_back(ADDI(1, 1, 4));      // 10
    p.push_back(ADDI(2, 2, -1));     // 11
    p.push_back(BNE(2, 0, -28));     // 12 -> 5
    p.push_back(CLR_ALL());          // 13
    p.push_back(LMAC_A(400, 5));     // 14
    p.push_back(LMAC_B(425, 5));     // 15
    p.push_back(MACM());            // 16
    p.push_back(STR_R(500, 5));      // 17
    p.push_back(MACADD());          // 18
    p.push_back(STR_R(525, 5));      // 19
    p.push_back(MACSUB());          // 20
    p.push_back(STR_R(550, 5));      // 21
    p.push_back(SUBMAC());          // 22
    p.push_back(STR_R(575, 0));      // 23 offset 0 = rows packed
    p.push_back(LMAC_B(400, 6));     // 24 strided load
    p.push_back(CLR_A());            // 25
    p.push_back(MACADD());          // 26 R = B
    p.push_back(STR_R(600, 7));      // 27 strided store
    p.push_back(CLR_B());            // 28
    p.push_back(CLR_R());            // 29
    p.push_back(STR_R(400, 5));      // 30 zeros over words 400..424
    p.push_back(JAL(10, 8));         // 31 -> 33
    p.push_back(ADDI(11, 0, 99));    // 31 skipped
    p.push_back(LUI(12, 20'h12345)); // 32
    p.push_back(ADDI(12, 12, 'h678));// 33
    p.push_back(SLLI(13, 12, 3));    // 34
    p.push_back(SRLI(14, 12, 3));    // 35
    p.push_back(SLT(15, 4, 5));      // 36
    p.push_back(SLT(16, 5, 4));      // 37
    p.push_back(SUB(17, 4, 5));      // 38
    p.push_back(AND(18, 12, 4));     // 39
    p.push_back(OR(19, 12, 5));      // 40
    p.push_back(BLT(4, 5, 8));       // 41 taken
    p.push_back(ADDI(11, 11, 1));    // 42 skipped
    p.push_back(BGE(4, 5, 8));       // 43 not taken
    p.push_back(ADDI(20, 0, 1));     // 44
    p.push_back(BEQ(20, 20, 8));     // 45 taken
    p.push_back(ADDI(20, 0, 2));     // 46 skipped
    p.push_back(ADDI(21, 0, 212));   // 48 address of 53
    p.push_back(JALR(22, 21, 0));    // 48 -> 52
    p.push_back(ADDI(11, 11, 1));    // 49 skipped
    p.push_back(ADDI(11, 11, 1));    // 50 skipped
    p.push_back(ADDI(11, 11, 1));    // 51 skipped
    p.push_back(ADDI(23, 0, 1600));  // 52
    p.push_back(SLLI(23, 23, 1));    // 53 x23 = 3200 (word 800)
    p.push_back(LW(24, 0, 2000));    // 54 word 500 = R(0,0) of A*B
    p.push_back(SW(2, 23, 0));       // 55
    p.push_back(SW(3, 23, 4));
    p.push_back(SW(10, 23, 8));
    p.push_back(SW(11, 23, 12));
    p.push_back(SW(12, 23, 16));
    p.push_back(SW(13, 23, 20));
    p.push_back(SW(14, 23, 24));
    p.push_back(SW(15, 23, 28));
    p.push_back(SW(16, 23, 32));
    p.push_back(SW(17, 23, 36));
    p.push_back(SW(18, 23, 40));
    p.push_back(SW(19, 23, 44));
    p.push_back(SW(20, 23, 48));
    p.push_back(SW(22, 23, 52));
    p.push_back(SW(24, 23, 56));     // 69
    p.push_back(JAL(0, 0));          // 70 end: stay here
  endfunction

  localparam int END_PC = 71 * 4;

  // Expected data memory words (word address -> value) after the program.
  function automatic void expected(ref logic [31:0] e[int]);
    logic [31:0] seq [50];
    logic [31:0] a [25], b [25], a6 [25];
    logic [31:0] x3;
    logic [31:0] x12;
    e.delete();
    x3 = 32'd3;
    for (int k = 0; k < 50; k++) begin
      seq[k] = x3;
      x3 = ((x3 - 32'd7) * 32'd3) ^ 32'(50 - k);
    end
    for (int k = 0; k < 25; k++) begin
      a[k] = seq[k];
      b[k] = seq[25 + k];
      a6[k] = seq[(k / 5) * 6 + (k % 5)];
    end
    for (int k = 0; k < 25; k++) begin
      e[400 + k] = 32'd0;
      e[425 + k] = b[k];
      e[525 + k] = a[k] + b[k];
      e[550 + k] = a[k] - b[k];
      e[575 + k] = b[k] - a[k];
      e[600 + (k / 5) * 7 + (k % 5)] = a6[k];
    end
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
      logic [31:0] acc = 0;
      for (int k = 0; k < 5; k++) acc += a[i*5+k] * b[k*5+j];
      e[500 + i*5 + j] = acc;
    end
    for (int i = 0; i < 4; i++) for (int g = 5; g < 7; g++) e[600 + i*7 + g] = 32'd0;
    x12 = 32'h1234_5678;
    e[800] = 32'd0;                 // x2
    e[801] = x3;                    // x3
    e[802] = 32'd128;               // x10 = return address of JAL at 124
    e[803] = 32'd0;                 // x11: every write to it was skipped
    e[804] = x12;
    e[805] = x12 << 3;
    e[806] = x12 >> 3;
    e[807] = 32'd1;                 // -7 < 3
    e[808] = 32'd0;
    e[809] = -32'sd10;
    e[810] = x12 & 32'hffff_fff9;
    e[811] = x12 | 32'd3;
    e[812] = 32'd1;                 // x20
    e[813] = 32'd200;               // x22 = return address of JALR at 196
    e[814] = e[500];                // x24 loaded from word 500
  endfunction
endpackage
