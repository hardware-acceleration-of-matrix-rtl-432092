// intellera_top: the complete Intellera matrix MAC processor.
//
// A host sends the program over a UART: while prog_mode is high the core is
// held in reset, the UART receiver turns the serial line uart_rxd into bytes,
// and the instruction loader joins each group of four bytes into a 32-bit
// instruction written to the next word of instruction memory (from word 0).
// Each received byte is echoed back on uart_txd as an acknowledgement (the
// echo is this design's use of the transmit half of the transceiver). When
// prog_mode goes low the 5-stage RISC-V core with the matrix MAC unit starts
// running the program from address 0. dbg_addr/dbg_rdata read words of data
// memory (word address), so results stored by SW or STR R can be read out;
// loaded_words tells how many instructions the last loading pass wrote.
//
// Parameters: IMEM_DEPTH and DMEM_DEPTH in 32-bit words, DIM the matrix
// dimension (5, i.e. 25 registers per matrix), CLKS_PER_BIT the UART bit time
// in clock cycles. Reset (rst_n) is synchronous and active low.
module intellera_top
  import intellera_pkg::*;
 #(
  parameter int unsigned IMEM_DEPTH   = 256,
  parameter int unsigned DMEM_DEPTH   = 1024,
  parameter int unsigned DIM          = 5,
  parameter int unsigned CLKS_PER_BIT = 2891,
  localparam int unsigned IAW         = $clog2(IMEM_DEPTH),
  localparam int unsigned DAW         = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           prog_mode,
  input  logic           uart_rxd,
  output logic           uart_txd,
  input  logic [DAW-1:0] dbg_addr,
  output logic [31:0]    dbg_rdata,
  output logic [IAW:0]   loaded_words
);
  logic [7:0]     rx_byte;
  logic           rx_valid;
  logic           imem_we;
  logic [IAW-1:0] imem_waddr;
  logic [31:0]    imem_wdata, imem_addr, imem_rdata;
  logic           tx_busy;
  logic           core_rst_n;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_byte), .valid(rx_valid)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(rx_valid && prog_mode), .data(rx_byte),
    .txd(uart_txd), .busy(tx_busy)
  );

  instr_loader #(.AW(IAW)) u_loader (
    .clk, .rst_n, .enable(prog_mode), .byte_in(rx_byte), .byte_valid(rx_valid),
    .imem_we, .imem_waddr, .imem_wdata, .count(loaded_words)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .rst_n, .addr(imem_addr), .rdata(imem_rdata),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  assign core_rst_n = rst_n && !prog_mode;

  riscv_pipeline #(.DMEM_DEPTH(DMEM_DEPTH), .DIM(DIM)) u_core (
    .clk, .rst_n(core_rst_n), .imem_addr, .imem_rdata, .dbg_addr, .dbg_rdata
  );
endmodule
