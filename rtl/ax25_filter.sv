// ax25_filter: majority filter on the demodulated DATA line.
// On every 8x1200 Hz strobe (en) the input is shifted into a 5-bit history
// register and the output becomes one when at least three of the last five
// samples (the new one and the four before it) are ones, as the original design
// describes. The output is registered, so it changes one system clock after
// the strobe. The shift register and output reset to zero.
module ax25_filter (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic din,
  output logic dout
);
  logic [3:0] hist;
  logic [4:0] window;
  logic [2:0] ones;

  assign window = {hist, din};
  always_comb begin
    ones = '0;
    for (int i = 0; i < 5; i++) ones += {2'b00, window[i]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist <= '0;
      dout <= 1'b0;
    end else if (en) begin
      hist <= window[3:0];
      dout <= (ones >= 3'd3);
    end
  end
endmodule
