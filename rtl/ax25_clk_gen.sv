// ax25_clk_gen: clock generator of the AX.25 frame decoder.
// Two counters divide the 7.3728 MHz system clock: one toggles clk8x1200
// every CLK_HZ/(2*8*BAUD) = 384 cycles (9.6 kHz), the other toggles
// clk32x1200 every CLK_HZ/(2*32*BAUD) = 96 cycles (38.4 kHz), as the original design
// describes ("two counters that count to specified values; once reached the
// output is negated"). In this design the rest of the logic stays on the
// system clock, so each square wave also comes with a one-cycle strobe
// (stb8, stb32) at its rising edge; the strobes are this design's addition.
// With en low both counters and outputs are held at zero.
module ax25_clk_gen #(
  parameter int unsigned CLK_HZ = 7372800,
  parameter int unsigned BAUD   = 1200
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic clk8x1200,
  output logic clk32x1200,
  output logic stb8,
  output logic stb32
);
  localparam int unsigned HALF8  = CLK_HZ / (2 * 8 * BAUD);
  localparam int unsigned HALF32 = CLK_HZ / (2 * 32 * BAUD);

  logic [$clog2(HALF8)-1:0]  cnt8;
  logic [$clog2(HALF32)-1:0] cnt32;

  always_ff @(posedge clk) begin
    stb8  <= 1'b0;
    stb32 <= 1'b0;
    if (rst || !en) begin
      cnt8       <= '0;
      cnt32      <= '0;
      clk8x1200  <= 1'b0;
      clk32x1200 <= 1'b0;
    end else begin
      if (cnt8 == ($bits(cnt8))'(HALF8 - 1)) begin
        cnt8      <= '0;
        clk8x1200 <= !clk8x1200;
        stb8      <= !clk8x1200;
      end else begin
        cnt8 <= cnt8 + 1'b1;
      end
      if (cnt32 == ($bits(cnt32))'(HALF32 - 1)) begin
        cnt32      <= '0;
        clk32x1200 <= !clk32x1200;
        stb32      <= !clk32x1200;
      end else begin
        cnt32 <= cnt32 + 1'b1;
      end
    end
  end
endmodule
