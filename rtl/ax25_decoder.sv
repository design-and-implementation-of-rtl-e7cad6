// ax25_decoder: AX.25 frame decoder (the FPGA part of the monitor).
// Input is the demodulated DATA line and the ENABLE line (signal present).
// The clock generator derives 8x and 32x bit-rate strobes. The filter takes
// a majority vote over the last five DATA samples at 8x the bit rate; the
// sampler recovers the bit clock from the filtered data at 32x the bit rate;
// the flag detector watches the recovered bits for 01111110; the
// deserializer turns the bits into octets, dropping stuffed zeros and
// realigning on every flag. The octets and the flag strobe go to the UART
// controller, which prints each frame as a text line, and to the LCD
// controller, which shows destination and source. This is the original design's
// block structure; the whole decoder here runs on the one 7.3728 MHz clock
// with enable strobes instead of the original design's divided clocks.
// RESET (rst, active high) resets every block and clears the LCD. The
// observation outputs octet/octet_valid/flag_seen show the deserializer's
// octets and the flags as they are found.
module ax25_decoder #(
  parameter int unsigned CLK_HZ            = 7372800,
  parameter int unsigned BAUD              = 1200,
  parameter int unsigned UART_CLKS_PER_BIT = 64,
  parameter int unsigned LCD_T_PWRON_US    = 20000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       data,
  output logic       txd_232,
  output logic       lrs,
  output logic       lrw,
  output logic       le,
  output logic [7:0] ld,
  output logic [7:0] octet,
  output logic       octet_valid,
  output logic       flag_seen
);
  logic clk8, clk32, stb8, stb32;
  logic filt;
  logic sample, bit_stb, bit_val;
  logic frame, frame_stb;
  logic in_frame;

  ax25_clk_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_clk_gen (
    .clk, .rst, .en(1'b1), .clk8x1200(clk8), .clk32x1200(clk32), .stb8, .stb32);

  ax25_filter u_filter (.clk, .rst, .en(stb8), .din(data), .dout(filt));

  ax25_sampler u_sampler (.clk, .rst, .en(stb32), .din(filt), .sample, .bit_stb, .bit_val);

  ax25_flag u_flag (.clk, .rst, .en(enable), .bit_stb, .din(bit_val), .frame, .frame_stb);

  ax25_deser u_deser (.clk, .rst, .en(enable), .bit_stb, .din(bit_val), .frame,
                      .dout(octet), .ready(octet_valid), .in_frame);

  ax25_serial #(.CLKS_PER_BIT(UART_CLKS_PER_BIT)) u_serial (
    .clk, .rst, .en(enable), .start(frame_stb), .data_valid(octet_valid), .byte_in(octet),
    .txd_232);

  ax25_lcd #(.CLK_HZ(CLK_HZ), .T_PWRON_US(LCD_T_PWRON_US)) u_lcd (
    .clk, .rst, .en(enable), .start(frame_stb), .data_valid(octet_valid), .byte_in(octet),
    .lrs, .lrw, .le, .ld);

  assign flag_seen = frame_stb;
endmodule
