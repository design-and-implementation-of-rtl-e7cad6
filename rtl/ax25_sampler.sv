// ax25_sampler: bit clock recovery for the AX.25 decoder.
// A 5-bit counter is advanced on every 32x1200 Hz strobe (en), so one bit
// lasts a full counter turn. Its MSB is the SAMPLE output, whose rising edge
// (counter 15 -> 16) should fall in the middle of a bit when data edges line
// up with counter value 0. When the data input changes while the counter is
// above 16 the counter is lagging and is advanced by 2 instead of 1, which
// pulls the bit clock into phase within a few octets. The original design states
// this condition in its design chapter; its implementation chapter adds 2 on
// any edge; this design follows the former.
// bit_stb is a one-cycle strobe at each rising edge of SAMPLE and bit_val the
// data value taken at that moment (this design's addition for single-clock
// operation).
module ax25_sampler (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic din,
  output logic sample,
  output logic bit_stb,
  output logic bit_val
);
  logic [4:0] cnt, cnt_next;
  logic       din_q;
  logic       edge_seen;

  assign edge_seen = (din != din_q);
  assign cnt_next  = cnt + ((edge_seen && cnt > 5'd16) ? 5'd2 : 5'd1);
  assign sample    = cnt[4];

  always_ff @(posedge clk) begin
    bit_stb <= 1'b0;
    if (rst) begin
      cnt     <= '0;
      din_q   <= 1'b0;
      bit_val <= 1'b0;
    end else if (en) begin
      din_q <= din;
      cnt   <= cnt_next;
      if (!cnt[4] && cnt_next[4]) begin
        bit_stb <= 1'b1;
        bit_val <= din;
      end
    end
  end
endmodule
