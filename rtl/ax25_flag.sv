// ax25_flag: AX.25 flag detector.
// An 8-bit shift register takes one recovered bit on each bit strobe. When
// the eight most recent bits form the flag 01111110 (7E hex) the FRAME output
// goes high and stays high until the next bit strobe; frame_stb is a
// one-cycle strobe at the same moment. Both are registered and valid one
// system clock after the bit strobe that completed the flag. With en (ENABLE)
// low the register is cleared so no flag can be found in noise between
// transmissions.
module ax25_flag
  import ax25_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic bit_stb,
  input  logic din,
  output logic frame,
  output logic frame_stb
);
  logic [7:0] sr, sr_next;

  // LSB-first: the newest bit enters at the top
  assign sr_next = {din, sr[7:1]};

  always_ff @(posedge clk) begin
    frame_stb <= 1'b0;
    if (rst || !en) begin
      sr    <= '0;
      frame <= 1'b0;
    end else if (bit_stb) begin
      sr        <= sr_next;
      frame     <= (sr_next == FLAG_OCTET);
      frame_stb <= (sr_next == FLAG_OCTET);
    end
  end
endmodule
