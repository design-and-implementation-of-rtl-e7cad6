// tb_ax25_flag: shifts a random bit stream with flags inserted into the flag
// detector and compares frame_stb and FRAME after every bit with the
// testbench's own record of the last eight bits. Also checks that lowering
// en clears the register.
module tb_ax25_flag;
  logic clk = 0, rst = 1, en = 1, bit_stb = 0, din = 0;
  logic frame, frame_stb;
  int checks = 0, failures = 0, flags = 0;
  bit last8 [$];

  ax25_flag dut (.clk, .rst, .en, .bit_stb, .din, .frame, .frame_stb);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bit(input bit b);
    bit exp;
    @(negedge clk);
    din = b; bit_stb = 1;
    last8.push_back(b);
    if (last8.size() > 8) void'(last8.pop_front());
    exp = (last8.size() == 8) && last8[0] == 0 && last8[1] && last8[2] && last8[3] &&
          last8[4] && last8[5] && last8[6] && last8[7] == 0;
    @(negedge clk);
    bit_stb = 0;
    checks++;
    if (frame_stb !== exp || frame !== exp) begin
      failures++;
      $display("FAIL: frame=%0b stb=%0b expected %0b", frame, frame_stb, exp);
    end
    if (exp) flags++;
    @(negedge clk);
    checks++;
    if (frame_stb !== 0 || frame !== exp) begin failures++; $display("FAIL: strobe too long or level lost"); end
  endtask

  task automatic send_flag();
    for (int i = 0; i < 8; i++) send_bit(i != 0 && i != 7);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 300; k++) begin
      if ($urandom_range(0, 9) == 0) send_flag();
      else send_bit(1'($urandom_range(0, 1)));
    end
    send_flag(); send_flag();
    @(negedge clk); en = 0; @(negedge clk); en = 1;
    last8.delete();
    checks++;
    if (dut.sr !== 8'h00 || frame) begin failures++; $display("FAIL: en low did not clear"); end
    for (int i = 2; i < 8; i++) send_bit(i != 7);   // partial flag only
    checks++;
    if (flags < 5) begin failures++; $display("FAIL: too few flags"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
