// afsk_strength: signal strength of one band-pass output.
// On each in_valid strobe the signed 8-bit input is rectified (absolute
// value, -128 clamped to 127) and smoothed by the original design's weighting
// low-pass, level = level/2 + |x|/2, with each half truncated as integer
// division does. 'level' and the one-clock out_valid strobe update on the
// clock after in_valid. The level resets to zero.
module afsk_strength (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [7:0] x,
  output logic [6:0]        level,
  output logic              out_valid
);
  logic [6:0] mag;

  always_comb begin
    if (x == -8'sd128)  mag = 7'd127;
    else if (x < 8'sd0) mag = 7'(-x);
    else                mag = 7'(x);
  end

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (rst) begin
      level <= '0;
    end else if (in_valid) begin
      level     <= {1'b0, level[6:1]} + {1'b0, mag[6:1]};
      out_valid <= 1'b1;
    end
  end
endmodule
