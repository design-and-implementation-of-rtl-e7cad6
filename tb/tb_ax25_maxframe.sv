// tb_ax25_maxframe: the longest AX.25 frame the monitor is meant to handle,
// run through the decoder at its default 7.3728 MHz / 1200 bit/s settings:
// destination, source and two repeaters (28 octets), an I-frame control
// octet, PID, a 256-octet information field and two FCS octets, 288 octets
// in all, bit-stuffed between flags. Checks every octet, the full text line
// on the UART (about 900 characters) and that the formatter's FIFO never
// holds more than two entries, i.e. the text keeps up with the bit rate.
module tb_ax25_maxframe;
  localparam int BIT_CLKS = 6144;
  localparam int UART_CPB = 64;
  logic clk = 0, rst = 1, enable = 0, data = 0;
  logic txd, lrs, lrw, le;
  logic [7:0] ld, octet;
  logic octet_valid, flag_seen;
  int checks = 0, failures = 0, max_fill = 0, n_octets = 0;
  logic [7:0] expq [$];
  string got = "", exp_s = "";

  ax25_decoder dut (.clk, .rst, .enable, .data, .txd_232(txd), .lrs, .lrw, .le, .ld,
                    .octet, .octet_valid, .flag_seen);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #4000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (octet_valid) begin
      n_octets++;
      if (expq.size() == 0) check(0, $sformatf("unexpected octet %h", octet));
      else begin
        automatic logic [7:0] e = expq.pop_front();
        if (octet != e) check(0, $sformatf("octet %0d is %h, expected %h", n_octets, octet, e));
      end
    end
    if (int'(dut.u_serial.u_fifo.count) > max_fill) max_fill = int'(dut.u_serial.u_fifo.count);
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

  int ones = 0;
  task automatic send_bit(input bit b);
    data = b;
    repeat (BIT_CLKS) @(negedge clk);
  endtask
  task automatic send_flag();
    for (int i = 0; i < 8; i++) send_bit(i != 0 && i != 7);
    ones = 0;
  endtask
  task automatic send_octet(input logic [7:0] o);
    expq.push_back(o);
    for (int i = 0; i < 8; i++) begin
      send_bit(o[i]);
      ones = o[i] ? ones + 1 : 0;
      if (ones == 5) begin send_bit(0); ones = 0; end
    end
  endtask
  task automatic send_addr(input string call, input int ssid, input bit last);
    for (int i = 0; i < 6; i++) send_octet((i < call.len() ? call[i] : 8'h20) << 1);
    send_octet(8'h60 | 8'(ssid << 1) | 8'(last));
  endtask

  initial begin
    logic [7:0] o;
    string h;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (3000) @(negedge clk);
    enable = 1;
    for (int i = 0; i < 10; i++) send_flag();
    send_addr("CQ", 0, 0); send_addr("OK2XYZ", 3, 0); send_addr("RELAY", 0, 0); send_addr("WIDE2", 2, 1);
    exp_s = "CQ    0 < OK2XYZ3 VIA RELAY 0 VIA WIDE2 2,PI";
    send_octet(8'h00);
    send_octet(8'hF0);
    exp_s = {exp_s, " F0"};
    for (int i = 0; i < 256 + 2; i++) begin
      o = (i % 16 == 5) ? 8'hFF : 8'($urandom);
      send_octet(o);
      h = $sformatf(" %02h", o);
      exp_s = {exp_s, h.toupper()};
    end
    send_flag(); send_flag();
    exp_s = {exp_s, "\r\n"};
    repeat (30000) @(negedge clk);
    enable = 0;
    check(n_octets == 288, $sformatf("%0d octets decoded", n_octets));
    check(expq.size() == 0, $sformatf("%0d octets missing", expq.size()));
    for (int i = 0; i < got.len() && i < exp_s.len(); i++) if (got[i] != exp_s[i]) begin $display("first difference at %0d: %s / %s", i, got.substr(i, i + 20), exp_s.substr(i, i + 20)); break; end
    check(got == exp_s, $sformatf("UART line differs (%0d characters, expected %0d)", got.len(), exp_s.len()));
    check(max_fill <= 2, $sformatf("FIFO held %0d entries", max_fill));
    $display("octets=%0d characters=%0d fifo_max=%0d", n_octets, got.len(), max_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
