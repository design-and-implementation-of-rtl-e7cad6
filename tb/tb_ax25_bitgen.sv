// tb_ax25_bitgen: loads the generator with flags and octets (including ones
// that need stuffing), sends them twice, samples dout in the middle of each
// bit period (8 clocks per bit here) and compares the bits with a stream the
// testbench builds itself: octets LSB first with a 0 after five ones, flags
// as 01111110. Also checks the bit count (busy time) and that the list is
// emptied after sending.
module tb_ax25_bitgen;
  localparam int BITC = 8;
  logic clk = 0, rst = 1, wr = 0, wr_flag = 0, go = 0;
  logic [7:0] wr_octet = 0;
  logic busy, dout;
  int checks = 0, failures = 0;

  ax25_bitgen #(.CLK_HZ(BITC * 1200), .BAUD(1200), .DEPTH(16)) dut (
    .clk, .rst, .wr, .wr_flag, .wr_octet, .go, .busy, .dout);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit expbits [$];
  int ones;

  task automatic load(input bit f, input logic [7:0] o);
    @(negedge clk); wr = 1; wr_flag = f; wr_octet = o;
    @(negedge clk); wr = 0;
    if (f) begin
      for (int i = 0; i < 8; i++) expbits.push_back(i != 0 && i != 7);
      ones = 0;
    end else begin
      for (int i = 0; i < 8; i++) begin
        expbits.push_back(o[i]);
        ones = o[i] ? ones + 1 : 0;
        if (ones == 5) begin expbits.push_back(0); ones = 0; end
      end
    end
  endtask

  task automatic send_and_check(input string what);
    bit got [$];
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    // first bit is on dout from the clock after go
    repeat (BITC / 2 - 1) @(negedge clk);
    while (busy) begin
      got.push_back(dout);
      repeat (BITC) @(negedge clk);
    end
    checks++;
    if (got.size() != expbits.size()) begin
      failures++; $display("FAIL %s: %0d bits, expected %0d", what, got.size(), expbits.size());
    end
    for (int i = 0; i < got.size() && i < expbits.size(); i++) begin
      checks++;
      if (got[i] != expbits[i]) begin failures++; $display("FAIL %s: bit %0d", what, i); end
    end
    checks++;
    if (dut.count != 0 || dout != 0) begin failures++; $display("FAIL %s: not emptied", what); end
    expbits.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    ones = 0;
    load(1, 0); load(1, 0);
    load(0, 8'hFF); load(0, 8'h7E); load(0, 8'h3F); load(0, 8'hF8); load(0, 8'h00); load(0, 8'hA5);
    load(1, 0);
    send_and_check("list 1");
    ones = 0;
    load(1, 0);
    for (int i = 0; i < 10; i++) load(0, 8'($urandom));
    load(1, 0);
    send_and_check("list 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
