// ax25_serial: UART controller of the AX.25 monitor.
// It decodes each frame while it arrives and prints one text line per frame:
//
//   DEST  S < SRC   S[ VIA REPT  S][ VIA REPT  S],pACR xx xx ...<CR><LF>
//
// Each address is its six call sign characters (octet >> 1, '?' when not
// printable) followed by the SSID (octet bits 4..1) as one hex digit. The
// address field ends at the SSID octet whose last bit (L) is set, or after two
// repeaters. The next octet is the control field: it prints ',', 'p' when its
// P/F bit is set or 'P' when clear, and the frame type acronym (I, RR, RNR,
// REJ, SREJ, SABME, SABM, DISC, DM, UA, FRMR, UI, XID, TEST, '?' otherwise).
// Every further octet (PID, information, FCS) prints as ' ' and two hex
// digits. A flag after at least one octet, or the loss of ENABLE, ends the
// line with CR LF. Format and field rules follow the original design; spacing,
// the hex SSID and the CR LF line end are this design's choices.
// Like the original design's FSM it is locked after a loss of signal and waits for a
// flag (start) before it takes octets. Octets and end-of-frame marks go into
// a FIFO_DEPTH-entry FIFO; a formatter pops one entry at a time, builds its
// text (at most 8 characters) and sends it through an 8N1 transmitter at
// CLKS_PER_BIT clocks per bit. At 1200 bit/s in and 115200 baud out the
// FIFO never fills.
module ax25_serial
  import ax25_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 64,
  parameter int unsigned FIFO_DEPTH   = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       start,
  input  logic       data_valid,
  input  logic [7:0] byte_in,
  output logic       txd_232
);
  // ---------------- front end: frame tracking and FIFO ----------------
  logic       en_q, armed, got_bytes;
  logic       push;
  logic [8:0] push_data;   // {end-of-frame, octet}
  logic       pop, fifo_empty, fifo_full;
  logic [8:0] head;

  always_comb begin
    push      = 1'b0;
    push_data = '0;
    if (armed && en && data_valid) begin
      push      = 1'b1;
      push_data = {1'b0, byte_in};
    end else if (got_bytes && ((en && start) || (!en && en_q))) begin
      push      = 1'b1;
      push_data = {1'b1, 8'h00};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q      <= 1'b0;
      armed     <= 1'b0;
      got_bytes <= 1'b0;
    end else begin
      en_q <= en;
      if (!en) armed <= 1'b0;
      else if (start) armed <= 1'b1;
      if (push) got_bytes <= !push_data[8];
    end
  end

  sync_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr(push), .wr_data(push_data), .rd(pop),
    .rd_data(head), .empty(fifo_empty), .full(fifo_full)
  );

  // ---------------- formatter ----------------
  typedef enum logic [1:0] {S_LOAD, S_SEND, S_WAIT} fmt_state_e;
  fmt_state_e state;

  char_t      msg [8];
  logic [3:0] msg_len, msg_idx;
  logic [2:0] pos;        // octet index inside a 7-octet address
  logic [1:0] sub;        // 0 destination, 1 source, 2..3 repeaters
  logic       addr_done, ctl_done;
  logic       tx_start, tx_busy;

  assign pop = (state == S_LOAD) && !fifo_empty;

  always_ff @(posedge clk) begin
    tx_start <= 1'b0;
    if (rst) begin
      state     <= S_LOAD;
      msg_len   <= '0;
      msg_idx   <= '0;
      pos       <= '0;
      sub       <= '0;
      addr_done <= 1'b0;
      ctl_done  <= 1'b0;
      for (int i = 0; i < 8; i++) msg[i] <= 8'h20;
    end else begin
      unique case (state)
        S_LOAD: if (!fifo_empty) begin
          automatic logic [7:0] o = head[7:0];
          automatic acr_t acr;
          automatic logic [2:0] alen;
          msg_idx <= '0;
          state   <= S_SEND;
          if (head[8]) begin
            msg[0]    <= 8'h0D;
            msg[1]    <= 8'h0A;
            msg_len   <= 4'd2;
            pos       <= '0;
            sub       <= '0;
            addr_done <= 1'b0;
            ctl_done  <= 1'b0;
          end else if (!addr_done) begin
            if (pos == 3'd6) begin
              msg[0]  <= hex_char(o[4:1]);
              msg_len <= 4'd1;
              pos     <= '0;
              sub     <= sub + 1'b1;
              if ((sub != 2'd0 && o[0]) || sub == 2'd3) addr_done <= 1'b1;
            end else begin
              pos <= pos + 1'b1;
              if (pos == 3'd0 && sub == 2'd1) begin
                msg[0] <= " "; msg[1] <= "<"; msg[2] <= " ";
                msg[3] <= callsign_char(o[7:1]);
                msg_len <= 4'd4;
              end else if (pos == 3'd0 && sub >= 2'd2) begin
                msg[0] <= " "; msg[1] <= "V"; msg[2] <= "I"; msg[3] <= "A"; msg[4] <= " ";
                msg[5] <= callsign_char(o[7:1]);
                msg_len <= 4'd6;
              end else begin
                msg[0]  <= callsign_char(o[7:1]);
                msg_len <= 4'd1;
              end
            end
          end else if (!ctl_done) begin
            control_acronym(o, acr, alen);
            msg[0] <= ",";
            msg[1] <= o[4] ? "p" : "P";
            for (int i = 0; i < 5; i++) msg[2+i] <= acr[i];
            msg_len  <= 4'd2 + {1'b0, alen};
            ctl_done <= 1'b1;
          end else begin
            msg[0]  <= " ";
            msg[1]  <= hex_char(o[7:4]);
            msg[2]  <= hex_char(o[3:0]);
            msg_len <= 4'd3;
          end
        end
        S_SEND: if (!tx_busy && !tx_start) begin
          if (msg_idx == msg_len) begin
            state <= S_LOAD;
          end else begin
            tx_start <= 1'b1;
            state    <= S_WAIT;
          end
        end
        S_WAIT: begin
          // one cycle for the transmitter to raise busy
          msg_idx <= msg_idx + 1'b1;
          state   <= S_SEND;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .start(tx_start), .data(msg[msg_idx[2:0]]), .busy(tx_busy), .txd(txd_232)
  );

  // The front end never offers more than one entry per cycle and the
  // formatter keeps up with the bit rate; an overflow would lose text.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) push |-> !fifo_full)
    else $error("ax25_serial: FIFO overflow");
endmodule
