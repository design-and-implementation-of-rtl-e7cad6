// tb_ax25_serial: feeds the UART controller whole frames (address, control,
// PID/info, FCS octets) the way the deserializer delivers them, decodes its
// serial output with a testbench UART receiver and compares the text with
// the lines expected by the output format: call signs with SSID, up to two
// repeaters, the P character and acronym of every control type, hex octets,
// '?' for unprintable characters, a line end on the closing flag or on loss
// of ENABLE, and no output for octets that arrive while the FSM is locked.
// The bit time is shortened to 8 clocks.
module tb_ax25_serial;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, en = 0, start = 0, data_valid = 0;
  logic [7:0] byte_in = 0;
  logic txd;
  int checks = 0, failures = 0;
  string got = "", exp_s = "";

  ax25_serial #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .en, .start, .data_valid, .byte_in, .txd_232(txd));
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // testbench UART receiver, 8N1
  initial begin
    logic [7:0] c;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        c[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL: stop bit"); end
      got = {got, string'(c)};
    end
  end

  typedef logic [7:0] oct_q [$];

  function automatic oct_q addr(input string call, input int ssid, input bit last);
    oct_q q;
    for (int i = 0; i < 6; i++) q.push_back((i < call.len() ? call[i] : 8'h20) << 1);
    q.push_back(8'h60 | 8'(ssid << 1) | 8'(last));
    return q;
  endfunction

  task automatic octet(input logic [7:0] o);
    @(negedge clk); byte_in = o; data_valid = 1;
    @(negedge clk); data_valid = 0;
    repeat (400) @(negedge clk);
  endtask

  task automatic flag();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (50) @(negedge clk);
  endtask

  task automatic frame(input oct_q q, input string text);
    foreach (q[i]) octet(q[i]);
    flag();
    exp_s = {exp_s, text, "\r\n"};
  endtask

  localparam logic [7:0] CTL [14] = '{8'h01, 8'h05, 8'h09, 8'h0D, 8'h6F, 8'h2F, 8'h43, 8'h0F,
                                      8'h63, 8'h87, 8'h03, 8'hAF, 8'hE3, 8'h00};
  localparam string      ACR [14] = '{"RR", "RNR", "REJ", "SREJ", "SABME", "SABM", "DISC", "DM",
                                      "UA", "FRMR", "UI", "XID", "TEST", "I"};

  initial begin
    oct_q q;
    repeat (3) @(posedge clk);
    rst = 0;
    en = 1;
    octet(8'h55);           // locked: no flag yet
    flag(); flag();
    q = {addr("APRS", 0, 0), addr("N7LEM", 5, 1), 8'h03, 8'hF0, 8'h41, 8'h42, 8'h12, 8'h34};
    frame(q, "APRS  0 < N7LEM 5,PUI F0 41 42 12 34");
    q = {addr("NJ7P", 0, 0), addr("N7LEM", 0, 0), addr("REPA", 0, 0), addr("WIDE2", 1, 1), 8'h32, 8'hF0, 8'h49};
    frame(q, "NJ7P  0 < N7LEM 0 VIA REPA  0 VIA WIDE2 1,pI F0 49");
    q = {addr("ZBC", 0, 0), addr("SK9DEM", 15, 1), 8'h3F};
    q[0] = 8'h02;   // code 0x01 is not printable
    frame(q, "?BC   0 < SK9DEMF,pSABM");
    for (int i = 0; i < 14; i++) begin
      q = {addr("X", 1, 0), addr("Y", 10, 1), CTL[i] | 8'h10, 8'hAB};
      frame(q, {"X     1 < Y     A,p", ACR[i], " AB"});
      q = {addr("X", 1, 0), addr("Y", 10, 1), CTL[i]};
      frame(q, {"X     1 < Y     A,P", ACR[i]});
    end
    q = {addr("A", 1, 0), addr("B", 2, 1), 8'hFF, 8'h00};
    frame(q, "A     1 < B     2,p? 00");
    // loss of signal ends the line; later octets are ignored until a flag
    q = {addr("LOST", 3, 0), addr("SIG", 4, 1), 8'h09};
    foreach (q[i]) octet(q[i]);
    @(negedge clk); en = 0;
    exp_s = {exp_s, "LOST  3 < SIG   4,PREJ\r\n"};
    repeat (50) @(negedge clk);
    en = 1;
    octet(8'h77); octet(8'h78);
    flag();
    q = {addr("END", 0, 0), addr("GO", 9, 1), 8'h13};
    frame(q, "END   0 < GO    9,pUI");
    repeat (3000) @(negedge clk);
    checks++;
    if (got != exp_s) begin
      failures++;
      $display("FAIL: text differs\n--- got ---\n%s\n--- expected ---\n%s", got, exp_s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
