// afsk_fir: 7-tap FIR band-pass filter for the AFSK demodulator.
// Each in_valid strobe shifts the signed 8-bit sample x into a delay line and
// forms y = sat8( (sum_k COEF[k] * x[n-k]) >>> 7 ) on the next clock, with
// out_valid high for that one clock. The coefficients are the original design's
// equi-ripple band-pass designs (8 kHz sampling) scaled to signed char as
// round(c * 127); the default is the 1200 Hz filter, the 2200 Hz filter is
// {11, -27, -11, 42, -11, -27, 11}. The division by 128 (shift by 7) and the
// saturation to -128..127 are this design's reading of the original design's
// signed-char filter function.
module afsk_fir #(
  parameter int unsigned     NTAPS = 7,
  parameter logic signed [7:0] COEF [NTAPS] = '{-8'sd20, -8'sd10, 8'sd20, 8'sd38, 8'sd20, -8'sd10, -8'sd20}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [7:0] x,
  output logic signed [7:0] y,
  output logic              out_valid
);
  logic signed [7:0]  taps [NTAPS];
  logic signed [19:0] acc;
  logic signed [12:0] scaled;

  // taps[0] is the newest sample
  always_comb begin
    acc = 20'sd0;
    acc += 20'(COEF[0] * x);
    for (int k = 1; k < NTAPS; k++) acc += 20'(COEF[k] * taps[k-1]);
    scaled = 13'(acc >>> 7);
  end

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) taps[k] <= '0;
      y <= '0;
    end else if (in_valid) begin
      taps[0] <= x;
      for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
      if (scaled > 13'sd127)       y <= 8'sd127;
      else if (scaled < -13'sd128) y <= -8'sd128;
      else                         y <= 8'(scaled);
      out_valid <= 1'b1;
    end
  end
endmodule
