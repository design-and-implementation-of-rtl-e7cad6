// ax25_lcd: LCD controller of the AX.25 monitor.
// It shows the destination and source of the latest frame on the one-line
// character LCD as 15 characters, "DEST  S<SOURCES": six call sign
// characters and one SSID hex digit per address, as the original design's display
// example does. Non-printable characters show as '?'. The display is cleared
// whenever ENABLE rises (a new signal is detected).
// Front end: after each flag (start) the first 14 octets fill a 15-character
// shadow line; the 14th requests a refresh. Octets are only taken after a
// flag seen while ENABLE is high.
// Driver: an HD44780-style write-only bus (RW held low, LD only driven).
// After T_PWRON_US it sends 0x38 (8-bit, one line), 0x0C (display on),
// 0x06 (increment) and 0x01 (clear). A refresh sends 0x80 (address 0) and the
// 15 characters. Each write holds RS and LD, pulses E high for E_CYCLES
// clocks, then waits T_CMD_US (T_CLR_US after a clear). The original design uses a
// ready-made LCD component it does not describe; the command set and timing
// are this design's, from the usual HD44780 datasheet values.
// A refresh takes 16 x 50 us = 0.8 ms, well below one octet at 1200 bit/s.
module ax25_lcd
  import ax25_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 7372800,
  parameter int unsigned T_PWRON_US = 20000,
  parameter int unsigned T_CMD_US   = 50,
  parameter int unsigned T_CLR_US   = 2000,
  parameter int unsigned E_CYCLES   = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       start,
  input  logic       data_valid,
  input  logic [7:0] byte_in,
  output logic       lrs,
  output logic       lrw,
  output logic       le,
  output logic [7:0] ld
);
  localparam longint unsigned CPMS = longint'(CLK_HZ) / 1000;
  localparam int unsigned C_PWRON = int'(CPMS * T_PWRON_US / 1000);
  localparam int unsigned C_CMD   = int'(CPMS * T_CMD_US / 1000);
  localparam int unsigned C_CLR   = int'(CPMS * T_CLR_US / 1000);
  localparam int unsigned CW      = $clog2(C_PWRON + C_CLR + C_CMD + E_CYCLES + 2);

  localparam int unsigned LINE_LEN = 15;

  // ---------------- front end ----------------
  char_t      line [LINE_LEN];
  logic [3:0] idx;
  logic       armed, en_q;
  logic       refresh_pending, clear_pending;
  logic       take_refresh, take_clear;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx             <= 4'd14;
      armed           <= 1'b0;
      en_q            <= 1'b0;
      refresh_pending <= 1'b0;
      clear_pending   <= 1'b0;
      for (int i = 0; i < LINE_LEN; i++) line[i] <= 8'h20;
      line[7] <= "<";
    end else begin
      en_q <= en;
      if (en && !en_q) clear_pending <= 1'b1;
      else if (take_clear) clear_pending <= 1'b0;
      if (take_refresh) refresh_pending <= 1'b0;
      if (!en) begin
        armed <= 1'b0;
      end else if (start) begin
        armed <= 1'b1;
        idx   <= '0;
      end else if (armed && data_valid && idx < 4'd14) begin
        idx <= idx + 1'b1;
        unique case (idx)
          4'd6:    line[6]  <= hex_char(byte_in[4:1]);
          4'd13: begin
            line[14]        <= hex_char(byte_in[4:1]);
            refresh_pending <= 1'b1;
          end
          default: line[(idx < 4'd6) ? idx : idx + 1'b1] <= callsign_char(byte_in[7:1]);
        endcase
      end
    end
  end

  // ---------------- bus driver ----------------
  typedef enum logic [2:0] {D_PWRON, D_INIT, D_IDLE, D_CLEAR, D_REFRESH} job_e;
  job_e        job;
  logic [4:0]  step;        // write index inside the current job
  logic        writing;     // a write is in progress
  logic [CW-1:0] cnt;
  logic [CW-1:0] wait_len;

  // what the current job writes at 'step'
  logic       nxt_rs;
  logic [7:0] nxt_data;
  logic [4:0] job_len;
  always_comb begin
    nxt_rs   = 1'b0;
    nxt_data = 8'h01;
    job_len  = 5'd1;
    unique case (job)
      D_INIT: begin
        job_len = 5'd4;
        unique case (step[1:0])
          2'd0: nxt_data = 8'h38;
          2'd1: nxt_data = 8'h0C;
          2'd2: nxt_data = 8'h06;
          default: nxt_data = 8'h01;
        endcase
      end
      D_REFRESH: begin
        job_len = 5'(LINE_LEN + 1);
        if (step == 5'd0) nxt_data = 8'h80;
        else begin
          nxt_rs   = 1'b1;
          nxt_data = line[4'(step - 5'd1)];
        end
      end
      default: ;
    endcase
  end

  assign take_clear   = (job == D_IDLE) && clear_pending;
  assign take_refresh = (job == D_IDLE) && !clear_pending && refresh_pending;
  assign lrw = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      job      <= D_PWRON;
      step     <= '0;
      writing  <= 1'b0;
      cnt      <= '0;
      wait_len <= '0;
      lrs      <= 1'b0;
      le       <= 1'b0;
      ld       <= '0;
    end else begin
      unique case (job)
        D_PWRON: begin
          if (cnt == CW'(C_PWRON)) begin
            cnt <= '0;
            job <= D_INIT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        D_IDLE: begin
          step <= '0;
          if (take_clear) job <= D_CLEAR;
          else if (take_refresh) job <= D_REFRESH;
        end
        default: begin
          if (!writing) begin
            // set up RS and data one clock before E rises
            writing  <= 1'b1;
            cnt      <= '0;
            lrs      <= nxt_rs;
            ld       <= nxt_data;
            wait_len <= CW'(E_CYCLES + 1) + ((!nxt_rs && nxt_data == 8'h01) ? CW'(C_CLR) : CW'(C_CMD));
          end else begin
            cnt <= cnt + 1'b1;
            le  <= (cnt < CW'(E_CYCLES));
            if (cnt == wait_len) begin
              writing <= 1'b0;
              le      <= 1'b0;
              if (step == job_len - 5'd1) begin
                job  <= D_IDLE;
                step <= '0;
              end else begin
                step <= step + 1'b1;
              end
            end
          end
        end
      endcase
    end
  end
endmodule
