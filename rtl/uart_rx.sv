// uart_rx: UART receiver, 8 data bits, 1 start bit, 1 stop bit, no parity.
//
// The serial input rxd is first synchronised with two flip-flops. A falling
// edge starts a frame; the start bit is checked at its middle, then each of
// the 8 data bits (least significant first) is sampled in the middle of its
// bit time, CLKS_PER_BIT clock cycles apart, and the stop bit is checked.
// When the stop bit is high, data holds the byte and valid pulses high for
// one cycle; a frame with a low stop bit is dropped. The frame format follows
// the design; the bit time is a parameter, whose default (333 MHz clock,
// 115200 baud) is this design's choice, as is the synchronous active-low reset.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 2891
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e                          state;
  logic [$clog2(CLKS_PER_BIT):0]   cnt;
  logic [2:0]                      bit_idx;
  logic [7:0]                      shift;
  logic                            rx_meta, rx_sync;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_meta <= 1'b1;
      rx_sync <= 1'b1;
    end else begin
      rx_meta <= rxd;
      rx_sync <= rx_meta;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shift   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx_sync) state <= S_START;
        end
        S_START: begin
          if (cnt == ($bits(cnt))'((CLKS_PER_BIT - 1) / 2)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx_sync ? S_IDLE : S_DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shift <= {rx_sync, shift[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rx_sync) begin
              data  <= shift;
              valid <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
