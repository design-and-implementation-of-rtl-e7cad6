// afsk_demod: AFSK 1200/2200 Hz demodulator (Bell 202 tones, 1200 baud).
// A timer issues adc_start every ADC_DIV clocks (921 at 7.3728 MHz, about
// 8 kHz). Each 12-bit ADC result is cut to its upper 8 bits and made signed
// by subtracting 128. The sample feeds two 7-tap band-pass filters, one at
// 1200 Hz and one at 2200 Hz; each output is rectified and smoothed
// (afsk_strength). DATA is high when the 1200 Hz level exceeds the 2200 Hz
// level (the reverse when 'negative' is set); ENABLE is high while either
// level exceeds ENABLE_TH. This is the original design's filter chain, which it
// runs in MCU software; the offset removal, the threshold value and the
// "either level" form of the ENABLE comparison are this design's choices.
// 'run' starts and stops the receiver, as the original's start and stop
// commands do: while it is low no conversion is started and DATA and ENABLE
// are held low; the filter and level state is kept.
// DATA and ENABLE are registered and change three clocks after adc_valid.
module afsk_demod #(
  parameter int unsigned ADC_DIV   = 921,
  parameter int unsigned ENABLE_TH = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  output logic        adc_start,
  input  logic        adc_valid,
  input  logic [11:0] adc_data,
  input  logic        negative,
  output logic        data,
  output logic        enable
);
  localparam logic signed [7:0] COEF_1200 [7] = '{-8'sd20, -8'sd10, 8'sd20, 8'sd38, 8'sd20, -8'sd10, -8'sd20};
  localparam logic signed [7:0] COEF_2200 [7] = '{ 8'sd11, -8'sd27, -8'sd11, 8'sd42, -8'sd11, -8'sd27, 8'sd11};

  logic [$clog2(ADC_DIV)-1:0] tmr;
  always_ff @(posedge clk) begin
    if (rst || !run) begin
      tmr       <= '0;
      adc_start <= 1'b0;
    end else begin
      adc_start <= (tmr == ($bits(tmr))'(ADC_DIV - 1));
      tmr       <= (tmr == ($bits(tmr))'(ADC_DIV - 1)) ? '0 : tmr + 1'b1;
    end
  end

  logic signed [7:0] sample;
  assign sample = $signed({~adc_data[11], adc_data[10:4]});

  logic signed [7:0] y1200, y2200;
  logic              v1200, v2200;
  logic [6:0]        l1200, l2200;
  logic              lv1200, lv2200;

  afsk_fir #(.COEF(COEF_1200)) u_bp1200 (
    .clk, .rst, .in_valid(adc_valid), .x(sample), .y(y1200), .out_valid(v1200));
  afsk_fir #(.COEF(COEF_2200)) u_bp2200 (
    .clk, .rst, .in_valid(adc_valid), .x(sample), .y(y2200), .out_valid(v2200));

  afsk_strength u_lp1200 (.clk, .rst, .in_valid(v1200), .x(y1200), .level(l1200), .out_valid(lv1200));
  afsk_strength u_lp2200 (.clk, .rst, .in_valid(v2200), .x(y2200), .level(l2200), .out_valid(lv2200));

  always_ff @(posedge clk) begin
    if (rst || !run) begin
      data   <= 1'b0;
      enable <= 1'b0;
    end else if (lv1200 && lv2200) begin
      data   <= negative ? (l2200 > l1200) : (l1200 > l2200);
      enable <= (l1200 > 7'(ENABLE_TH)) || (l2200 > 7'(ENABLE_TH));
    end
  end
endmodule
