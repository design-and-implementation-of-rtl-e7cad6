// tb_ax25_deser: sends frames of random octets, LSB first with bit stuffing,
// between flags, plus noise before the first flag, and checks that the
// deserializer returns exactly the octets sent, in order, and nothing for
// the noise or the flags. FRAME is produced by the testbench one clock after
// the bit strobe of a flag's last bit, as the flag detector does. Also
// counts the stuffed zeros removed and checks that dropping ENABLE stops
// octet output until the next flag.
module tb_ax25_deser;
  logic clk = 0, rst = 1, en = 0, bit_stb = 0, din = 0, frame = 0;
  logic [7:0] dout;
  logic ready, in_frame;
  int checks = 0, failures = 0, stuffed = 0;
  logic [7:0] expq [$];
  bit last8 [$];
  int ones = 0;

  ax25_deser dut (.clk, .rst, .en, .bit_stb, .din, .frame, .dout, .ready, .in_frame);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bit(input bit b);
    bit is_flag;
    @(negedge clk); din = b; bit_stb = 1;
    last8.push_back(b);
    if (last8.size() > 8) void'(last8.pop_front());
    is_flag = last8.size() == 8 && !last8[0] && last8[1] && last8[2] && last8[3] &&
              last8[4] && last8[5] && last8[6] && !last8[7];
    @(negedge clk); bit_stb = 0; frame = is_flag;
    repeat (3) @(negedge clk);
  endtask

  task automatic send_flag();
    for (int i = 0; i < 8; i++) send_bit(i != 0 && i != 7);
    ones = 0;
  endtask

  task automatic send_octet(input logic [7:0] o, input bit expect_it);
    if (expect_it) expq.push_back(o);
    for (int i = 0; i < 8; i++) begin
      send_bit(o[i]);
      ones = o[i] ? ones + 1 : 0;
      if (ones == 5) begin send_bit(0); ones = 0; stuffed++; end
    end
  endtask

  always @(posedge clk) if (ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL: unexpected octet %h", dout); end
    else begin
      automatic logic [7:0] e = expq.pop_front();
      if (dout !== e) begin failures++; $display("FAIL: got %h expected %h", dout, e); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0; en = 1;
    for (int i = 0; i < 20; i++) send_bit(1'($urandom_range(0, 1)));   // noise before any flag
    ones = 0;
    for (int f = 0; f < 6; f++) begin
      send_flag(); send_flag();
      for (int k = 0; k < 5 + f * 3; k++) begin
        send_octet((k % 4 == 1) ? 8'hFF : ((k % 4 == 2) ? 8'h7E : 8'($urandom)), 1);
      end
    end
    send_flag();
    // ENABLE drop: octets afterwards are ignored until a flag
    @(negedge clk); en = 0; @(negedge clk); en = 1;
    checks++;
    if (in_frame) begin failures++; $display("FAIL: in_frame survived ENABLE drop"); end
    ones = 0;
    for (int k = 0; k < 3; k++) send_octet(8'hA5, 0);
    send_flag();
    send_octet(8'h3C, 1);
    send_flag();
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d octets missing", expq.size()); end
    checks++;
    if (stuffed == 0) begin failures++; $display("FAIL: no stuffing exercised"); end
    $display("stuffed zeros: %0d", stuffed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
