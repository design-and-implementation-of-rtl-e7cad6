// ax25_bitgen: test bitstream generator.
// It plays the role of the original design's MCU test generator, which sends an
// array of octets to the decoder, one bit per bit period, with a special
// entry standing for a flag. Entries are loaded with 'wr' while idle
// (wr_flag marks a flag, otherwise wr_octet is the octet), up to DEPTH of
// them. 'go' sends them in order on dout, CLK_HZ/BAUD clocks per bit, each
// octet LSB first. Data octets are bit-stuffed as AX.25 requires (a 0 after
// five consecutive ones); flags are sent as 01111110 without stuffing.
// 'busy' is high while sending; at the end the list is emptied and dout
// returns to 0. Stuffing, the buffer depth and the idle level are this
// design's choices.
module ax25_bitgen #(
  parameter int unsigned CLK_HZ = 7372800,
  parameter int unsigned BAUD   = 1200,
  parameter int unsigned DEPTH  = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr,
  input  logic       wr_flag,
  input  logic [7:0] wr_octet,
  input  logic       go,
  output logic       busy,
  output logic       dout
);
  localparam int unsigned BIT_CLKS = CLK_HZ / BAUD;
  localparam int unsigned AW       = $clog2(DEPTH);

  typedef struct packed {
    logic       flag;
    logic [7:0] octet;
  } entry_t;

  entry_t     mem [DEPTH];
  logic [AW:0] count, rd_idx;
  logic [2:0] bitpos;
  logic [2:0] ones;
  logic       stuff;
  logic [$clog2(BIT_CLKS)-1:0] tick;
  entry_t     cur;
  logic       b;

  assign cur = mem[rd_idx[AW-1:0]];
  assign b   = cur.flag ? ((bitpos != 3'd0) && (bitpos != 3'd7)) : cur.octet[bitpos];

  always_ff @(posedge clk) begin
    if (!busy && wr && count < (AW+1)'(DEPTH)) mem[count[AW-1:0]] <= '{flag: wr_flag, octet: wr_octet};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count  <= '0;
      rd_idx <= '0;
      bitpos <= '0;
      ones   <= '0;
      stuff  <= 1'b0;
      tick   <= '0;
      busy   <= 1'b0;
      dout   <= 1'b0;
    end else if (!busy) begin
      if (wr && count < (AW+1)'(DEPTH)) count <= count + 1'b1;
      if (go && count != '0) begin
        busy   <= 1'b1;
        rd_idx <= '0;
        bitpos <= '0;
        ones   <= '0;
        stuff  <= 1'b0;
        tick   <= ($bits(tick))'(BIT_CLKS - 1);
      end
    end else if (tick != ($bits(tick))'(BIT_CLKS - 1)) begin
      tick <= tick + 1'b1;
    end else begin
      tick <= '0;
      if (stuff) begin
        dout  <= 1'b0;
        stuff <= 1'b0;
        ones  <= '0;
      end else if (rd_idx == count) begin
        busy  <= 1'b0;
        dout  <= 1'b0;
        count <= '0;
      end else begin
        dout   <= b;
        bitpos <= bitpos + 1'b1;
        if (bitpos == 3'd7) rd_idx <= rd_idx + 1'b1;
        if (cur.flag || !b) begin
          ones <= '0;
        end else begin
          ones <= ones + 1'b1;
          if (ones == 3'd4) stuff <= 1'b1;
        end
      end
    end
  end
endmodule
