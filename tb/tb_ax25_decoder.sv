// tb_ax25_decoder: runs the frame decoder at its default 7.3728 MHz clock and
// 1200 bit/s. A testbench bit source sends a flag preamble and two frames
// (bit-stuffed, LSB first) on DATA with ENABLE high, with short glitches
// (one filter sample long) in some bits. Checks that the decoded octets
// equal those sent, that the UART line for each frame matches the expected
// text, and that the LCD shows destination and source of the last frame.
// Also counts flags, stuffed zeros, glitches and sampler phase corrections.
module tb_ax25_decoder;
  localparam int BIT_CLKS = 6144;
  localparam int UART_CPB = 64;
  logic clk = 0, rst = 1, enable = 0, data = 0;
  logic txd, lrs, lrw, le;
  logic [7:0] ld, octet;
  logic octet_valid, flag_seen;
  int checks = 0, failures = 0;
  int n_flags = 0, n_stuffed = 0, n_glitch = 0, n_corr = 0;
  logic [7:0] expq [$];
  string got = "", exp_s = "";
  logic [8:0] lcd_w [$];

  ax25_decoder dut (.clk, .rst, .enable, .data, .txd_232(txd), .lrs, .lrw, .le, .ld,
                    .octet, .octet_valid, .flag_seen);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (octet_valid && !rst) begin
      if (expq.size() == 0) check(0, $sformatf("unexpected octet %h at %0t en=%0b", octet, $time, enable));
      else begin
        automatic logic [7:0] e = expq.pop_front();
        check(octet == e, $sformatf("octet %h expected %h", octet, e));
      end
    end
    if (flag_seen && !rst) n_flags++;
    if (dut.u_sampler.en && dut.u_sampler.edge_seen && dut.u_sampler.cnt > 5'd16) n_corr++;
  end

  initial begin : uart_rx
    logic [7:0] c;
    forever begin
      @(negedge txd);
      repeat (UART_CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (UART_CPB) @(posedge clk); c[i] = txd; end
      repeat (UART_CPB) @(posedge clk);
      got = {got, string'(c)};
    end
  end

  logic le_q = 0;
  always @(posedge clk) begin
    if (!le && le_q) lcd_w.push_back({lrs, ld});
    le_q <= le;
  end

  int ones = 0;
  task automatic send_bit(input bit b, input bit glitch);
    data = b;
    if (glitch) begin
      repeat (BIT_CLKS / 2) @(negedge clk);
      data = !b; n_glitch++;
      repeat (768) @(negedge clk);
      data = b;
      repeat (BIT_CLKS - BIT_CLKS / 2 - 768) @(negedge clk);
    end else begin
      repeat (BIT_CLKS) @(negedge clk);
    end
  endtask
  task automatic send_flag();
    for (int i = 0; i < 8; i++) send_bit(i != 0 && i != 7, 0);
    ones = 0;
  endtask
  task automatic send_octet(input logic [7:0] o);
    expq.push_back(o);
    for (int i = 0; i < 8; i++) begin
      send_bit(o[i], (i == 3) && ($urandom_range(0, 3) == 0));
      ones = o[i] ? ones + 1 : 0;
      if (ones == 5) begin send_bit(0, 0); ones = 0; n_stuffed++; end
    end
  endtask
  task automatic send_addr(input string call, input int ssid, input bit last);
    for (int i = 0; i < 6; i++) send_octet((i < call.len() ? call[i] : 8'h20) << 1);
    send_octet(8'h60 | 8'(ssid << 1) | 8'(last));
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (1000 + $urandom_range(0, 6000)) @(negedge clk);
    enable = 1;
    for (int i = 0; i < 12; i++) send_flag();
    send_addr("APRS", 0, 0); send_addr("OK1ABC", 7, 0); send_addr("WIDE1", 1, 1);
    send_octet(8'h03); send_octet(8'hF0);
    send_octet(8'h3E); send_octet(8'hFF); send_octet(8'h21);
    send_octet(8'h5A); send_octet(8'hC3);
    send_flag(); send_flag();
    exp_s = {exp_s, "APRS  0 < OK1ABC7 VIA WIDE1 1,PUI F0 3E FF 21 5A C3\r\n"};
    send_addr("QSL", 0, 0); send_addr("SK9DEM", 0, 1);
    send_octet(8'h10);                    // I frame, P set
    send_octet(8'hF0); send_octet(8'h7E); send_octet(8'hAB); send_octet(8'hCD);
    send_flag(); send_flag(); send_flag();
    exp_s = {exp_s, "QSL   0 < SK9DEM0,pI F0 7E AB CD\r\n"};
    enable = 0;
    repeat (20000) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d octets not received", expq.size()));
    check(got == exp_s, $sformatf("UART text\n%s\nexpected\n%s", got, exp_s));
    begin
      string lcd = "";
      int i0 = -1;
      foreach (lcd_w[i]) if (lcd_w[i] == 9'h080) i0 = i;
      if (i0 >= 0) for (int i = i0 + 1; i < lcd_w.size(); i++) if (lcd_w[i][8]) lcd = {lcd, string'(lcd_w[i][7:0])};
      check(lcd == "QSL   0<SK9DEM0", {"LCD shows '", lcd, "'"});
    end
    check(n_flags >= 17, $sformatf("flags detected %0d", n_flags));
    check(n_stuffed > 0, "no stuffed zero");
    check(n_glitch > 0, "no glitch");
    $display("flags=%0d stuffed=%0d glitches=%0d phase_corrections=%0d", n_flags, n_stuffed, n_glitch, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
