// ax25_monitor: AX.25 packet monitor, top level.
// It receives AFSK-modulated AX.25 frames (1200 baud, 1200/2200 Hz tones)
// from an audio ADC and reports every frame it decodes as a text line on a
// UART and as destination/source call signs on a character LCD.
// Data path: afsk_demod times the ADC conversions (about 8 kHz), filters the
// samples with two band-pass filters and compares the two signal levels to
// produce DATA and ENABLE. A multiplexer lets the test bitstream generator
// (ax25_bitgen) drive DATA instead, with ENABLE held high while it sends,
// which is how the monitor is tested without a radio. ax25_decoder then
// recovers bits, finds flags, removes bit stuffing and formats the frames.
// The original design splits this between an MCU (demodulator, test generator) and
// an FPGA (decoder); here all of it is logic on one 7.3728 MHz clock, and the
// ADC is outside, behind adc_start/adc_valid/adc_data.
// Ports: run starts (high) and stops the receiver; negative swaps the
// meaning of the tones; test_mode selects the generator; gen_* load and start it; data/enable show the decoder's input.
module ax25_monitor #(
  parameter int unsigned CLK_HZ            = 7372800,
  parameter int unsigned BAUD              = 1200,
  parameter int unsigned ADC_DIV           = 921,
  parameter int unsigned ENABLE_TH         = 8,
  parameter int unsigned UART_CLKS_PER_BIT = 64,
  parameter int unsigned LCD_T_PWRON_US    = 20000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  output logic        adc_start,
  input  logic        adc_valid,
  input  logic [11:0] adc_data,
  input  logic        negative,
  input  logic        test_mode,
  input  logic        gen_wr,
  input  logic        gen_flag,
  input  logic [7:0]  gen_octet,
  input  logic        gen_go,
  output logic        gen_busy,
  output logic        data,
  output logic        enable,
  output logic        txd_232,
  output logic        lrs,
  output logic        lrw,
  output logic        le,
  output logic [7:0]  ld,
  output logic [7:0]  octet,
  output logic        octet_valid,
  output logic        flag_seen
);
  logic demod_data, demod_enable, gen_dout;

  afsk_demod #(.ADC_DIV(ADC_DIV), .ENABLE_TH(ENABLE_TH)) u_demod (
    .clk, .rst, .run, .adc_start, .adc_valid, .adc_data, .negative,
    .data(demod_data), .enable(demod_enable));

  ax25_bitgen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_bitgen (
    .clk, .rst, .wr(gen_wr), .wr_flag(gen_flag), .wr_octet(gen_octet), .go(gen_go),
    .busy(gen_busy), .dout(gen_dout));

  assign data   = test_mode ? gen_dout : demod_data;
  assign enable = test_mode ? gen_busy : demod_enable;

  ax25_decoder #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .UART_CLKS_PER_BIT(UART_CLKS_PER_BIT),
                 .LCD_T_PWRON_US(LCD_T_PWRON_US)) u_decoder (
    .clk, .rst, .enable, .data, .txd_232, .lrs, .lrw, .le, .ld,
    .octet, .octet_valid, .flag_seen);
endmodule
