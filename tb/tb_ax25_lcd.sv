// tb_ax25_lcd: records every bus write of the LCD controller (RS and data
// at the falling edge of E) and checks the power-on sequence (38, 0C, 06,
// 01 after the power-on wait), a clear (01) at each rise of ENABLE, and the
// 16 writes of each refresh: address 0 (80) then "DEST  S<SOURCES". Also
// checks the E pulse width, that RS and data are stable while E is high,
// the wait after each write and after a clear, and that octets before the
// first flag are ignored. The LCD waits are shortened through parameters.
module tb_ax25_lcd;
  localparam int CPMS = 7372;
  localparam int C_PWRON = CPMS * 10 / 1000, C_CMD = CPMS * 2 / 1000, C_CLR = CPMS * 5 / 1000;
  logic clk = 0, rst = 1, en = 0, start = 0, data_valid = 0;
  logic [7:0] byte_in = 0;
  logic lrs, lrw, le;
  logic [7:0] ld;
  int checks = 0, failures = 0;
  logic [8:0] writes [$];
  int cyc = 0, e_rise = 0, last_fall = -1;
  logic [8:0] last_w = '0;

  ax25_lcd #(.T_PWRON_US(10), .T_CMD_US(2), .T_CLR_US(5)) dut (
    .clk, .rst, .en, .start, .data_valid, .byte_in, .lrs, .lrw, .le, .ld);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic le_q = 0, rs_q = 0;
  logic [7:0] ld_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (le && !le_q) begin
      e_rise = cyc;
      if (last_fall >= 0)
        check(cyc - last_fall >= ((last_w == 9'h001) ? C_CLR : C_CMD),
              $sformatf("wait after %h only %0d", last_w, cyc - last_fall));
    end
    if (le && le_q) check(lrs == rs_q && ld == ld_q, "bus changed while E high");
    if (!le && le_q) begin
      check(cyc - e_rise == 4, $sformatf("E width %0d", cyc - e_rise));
      writes.push_back({rs_q, ld_q});
      last_w = {rs_q, ld_q};
      last_fall = cyc;
    end
    check(lrw == 1'b0, "RW must stay low");
    le_q = le; rs_q = lrs; ld_q = ld;
  end

  task automatic expect_writes(input logic [8:0] e [$], input string what);
    check(writes.size() == e.size(), $sformatf("%s: %0d writes, expected %0d", what, writes.size(), e.size()));
    for (int i = 0; i < e.size() && i < writes.size(); i++)
      check(writes[i] == e[i], $sformatf("%s: write %0d is %h, expected %h", what, i, writes[i], e[i]));
    writes.delete();
  endtask

  function automatic void line_writes(input string s, ref logic [8:0] e [$]);
    e.push_back(9'h080);
    for (int i = 0; i < s.len(); i++) e.push_back({1'b1, s[i]});
  endfunction

  task automatic octet(input logic [7:0] o);
    @(negedge clk); byte_in = o; data_valid = 1;
    @(negedge clk); data_valid = 0;
    repeat (20) @(negedge clk);
  endtask
  task automatic flag();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
  endtask
  task automatic addr(input string call, input int ssid, input bit last);
    for (int i = 0; i < 6; i++) octet((i < call.len() ? call[i] : 8'h20) << 1);
    octet(8'h60 | 8'(ssid << 1) | 8'(last));
  endtask

  initial begin
    logic [8:0] e [$];
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (C_PWRON + 4 * (C_CMD + 10) + C_CLR + 100) @(negedge clk);
    e = '{9'h038, 9'h00C, 9'h006, 9'h001};
    expect_writes(e, "init");
    en = 1;
    repeat (C_CLR + 50) @(negedge clk);
    e = '{9'h001};
    expect_writes(e, "clear on signal");
    octet(8'hAA);                 // before a flag: ignored
    flag();
    addr("QSL", 0, 0); addr("SK9DEM", 0, 1);
    octet(8'h03); octet(8'hF0);
    repeat (16 * (C_CMD + 10)) @(negedge clk);
    e.delete();
    line_writes("QSL   0<SK9DEM0", e);
    expect_writes(e, "frame 1");
    flag();
    octet(8'h02); octet("B" << 1); octet("C" << 1); octet(8'h40); octet(8'h40); octet(8'h40); octet(8'h7E);
    addr("N7LEM", 12, 1);
    repeat (16 * (C_CMD + 10)) @(negedge clk);
    e.delete();
    line_writes("?BC   F<N7LEM C", e);
    expect_writes(e, "frame 2");
    en = 0;
    repeat (10) @(negedge clk);
    en = 1;
    repeat (C_CLR + 50) @(negedge clk);
    e = '{9'h001};
    expect_writes(e, "clear on new signal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
