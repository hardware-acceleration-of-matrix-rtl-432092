// instr_loader: assembles UART bytes into 32-bit instructions for the
// instruction memory.
//
// The UART carries 8 bits per frame, so each instruction arrives as four
// bytes. A four-state machine (one state per byte of the word) shifts each
// received byte (byte_valid) into a holding register; on the fourth byte the
// complete word is written to instruction memory (imem_we for one cycle) at
// word address waddr, which then advances by one. Bytes arrive least
// significant first (the RISC-V byte order) - this order is this design's
// choice. Loading is active only while enable is high; while enable is low
// the byte state and the address counter return to 0, so each loading pass
// starts at address 0 (also this design's choice). count is the number of
// words written in the current loading pass.
module instr_loader #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [7:0]    byte_in,
  input  logic          byte_valid,
  output logic          imem_we,
  output logic [AW-1:0] imem_waddr,
  output logic [31:0]   imem_wdata,
  output logic [AW:0]   count
);
  typedef enum logic [1:0] {B0, B1, B2, B3} state_e;
  state_e      state;
  logic [23:0] hold;

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      state      <= B0;
      hold       <= '0;
      imem_we    <= 1'b0;
      imem_waddr <= '0;
      imem_wdata <= '0;
      count      <= '0;
    end else begin
      imem_we <= 1'b0;
      if (imem_we) begin
        imem_waddr <= imem_waddr + 1'b1;
        count      <= count + 1'b1;
      end
      if (byte_valid) begin
        unique case (state)
          B0: begin hold[7:0]   <= byte_in; state <= B1; end
          B1: begin hold[15:8]  <= byte_in; state <= B2; end
          B2: begin hold[23:16] <= byte_in; state <= B3; end
          B3: begin
            imem_wdata <= {byte_in, hold};
            imem_we    <= 1'b1;
            state      <= B0;
          end
          default: state <= B0;
        endcase
      end
    end
  end
endmodule
