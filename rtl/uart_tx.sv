// uart_tx: UART transmitter, 8 data bits, 1 start bit, 1 stop bit, no parity.
//
// When start is pulsed while busy is low, data is latched and sent on txd:
// a low start bit, the 8 data bits least significant first, and a high stop
// bit, each CLKS_PER_BIT clock cycles long. busy stays high from the cycle
// after start until the stop bit has been sent; txd idles high. The frame
// format follows the design; the default bit time (333 MHz, 115200 baud) and
// the synchronous active-low reset are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 2891
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy
);
  logic [$clog2(CLKS_PER_BIT):0] cnt;
  logic [3:0]                    bit_idx;   // 0 start, 1..8 data, 9 stop
  logic [9:0]                    frame;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      txd     <= 1'b1;
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        frame   <= {1'b1, data, 1'b0};
        busy    <= 1'b1;
        cnt     <= '0;
        bit_idx <= '0;
        txd     <= 1'b0;
      end
    end else begin
      if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          txd     <= frame[bit_idx + 1'b1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
