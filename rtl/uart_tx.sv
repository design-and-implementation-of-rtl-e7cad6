// uart_tx: 8N1 serial transmitter.
// When idle and 'start' is high, the octet is latched and sent as one start
// bit (0), eight data bits LSB first and one stop bit (1), each lasting
// CLKS_PER_BIT system clocks. 'busy' is high from the cycle after 'start'
// until the stop bit has ended; txd idles high. The bit rate is this
// design's choice (115200 baud from 7.3728 MHz by default).
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);
  logic [$clog2(CLKS_PER_BIT)-1:0] tick;
  logic [3:0] nbit;      // 0 start, 1..8 data, 9 stop
  logic [8:0] frame_sh;  // data bits then stop bit

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      txd      <= 1'b1;
      tick     <= '0;
      nbit     <= '0;
      frame_sh <= '1;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        txd      <= 1'b0;
        tick     <= '0;
        nbit     <= '0;
        frame_sh <= {1'b1, data};
      end
    end else if (tick == ($bits(tick))'(CLKS_PER_BIT - 1)) begin
      tick <= '0;
      if (nbit == 4'd9) begin
        busy <= 1'b0;
        txd  <= 1'b1;
      end else begin
        nbit     <= nbit + 1'b1;
        txd      <= frame_sh[0];
        frame_sh <= {1'b1, frame_sh[8:1]};
      end
    end else begin
      tick <= tick + 1'b1;
    end
  end
endmodule
