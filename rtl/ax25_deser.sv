// ax25_deser: deserializer with bit destuffing.
// Recovered bits arrive LSB first, one per bit strobe. The bit is processed
// one system clock after its strobe, when the flag detector's FRAME output
// for the same bit is already valid; this stands in for the original design's
// registers that shift on the falling edge of the bit clock. A counter of
// consecutive ones plays the role of the original design's second shift register:
// a bit that arrives after five or more ones is not shifted in, which drops
// the zero the transmitter stuffed after five ones (and the tail of a flag).
// Every other bit is shifted into the octet register; after eight of them
// the octet appears on dout with a one-cycle ready strobe.
// FRAME realigns the octet counter, so the first octet after a flag starts
// on the next bit. Octets are only produced once a flag has been seen while
// en (ENABLE) is high; in_frame shows that state. Reset is synchronous.
module ax25_deser (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       bit_stb,
  input  logic       din,
  input  logic       frame,
  output logic [7:0] dout,
  output logic       ready,
  output logic       in_frame
);
  logic       stb_d;   // bit strobe delayed by one clock
  logic       din_d;
  logic [2:0] ones;    // consecutive ones, saturating at 7
  logic [2:0] nbits;   // bits of the current octet
  logic [7:0] shreg;

  always_ff @(posedge clk) begin
    ready <= 1'b0;
    if (rst || !en) begin
      stb_d    <= 1'b0;
      din_d    <= 1'b0;
      ones     <= '0;
      nbits    <= '0;
      shreg    <= '0;
      dout     <= '0;
      in_frame <= 1'b0;
    end else begin
      stb_d <= bit_stb;
      din_d <= din;
      if (stb_d) begin
        ones <= din_d ? ((ones == 3'd7) ? ones : ones + 1'b1) : 3'd0;
        if (frame) begin
          in_frame <= 1'b1;
          nbits    <= '0;
        end else if (ones < 3'd5) begin
          shreg <= {din_d, shreg[7:1]};
          nbits <= nbits + 1'b1;
          if (nbits == 3'd7 && in_frame) begin
            dout  <= {din_d, shreg[7:1]};
            ready <= 1'b1;
          end
        end
      end
    end
  end
endmodule
