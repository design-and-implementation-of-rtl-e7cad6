// tb_ax25_clk_gen: checks the clock generator at its default 7.3728 MHz /
// 1200 baud setting: stb8 every 768 clocks (9.6 kHz), stb32 every 192 clocks
// (38.4 kHz), each square wave high for half its period, strobes only at
// rising edges, and everything held low while en is low.
module tb_ax25_clk_gen;
  logic clk = 0, rst = 1, en = 0;
  logic clk8, clk32, stb8, stb32;
  int checks = 0, failures = 0;

  ax25_clk_gen dut (.clk, .rst, .en, .clk8x1200(clk8), .clk32x1200(clk32), .stb8, .stb32);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cyc = 0, last8 = 0, last32 = 0, n8 = 0, n32 = 0, high8 = 0, prev8 = 0;
  logic clk8_q = 0, clk32_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && en) begin
      if (stb8) begin
        if (n8 > 0) check(cyc - last8 == 768, $sformatf("stb8 period %0d", cyc - last8));
        last8 = cyc; n8++;
      end
      if (stb32) begin
        if (n32 > 0) check(cyc - last32 == 192, $sformatf("stb32 period %0d", cyc - last32));
        last32 = cyc; n32++;
      end
      // a strobe accompanies each rising edge of the square wave
      if (clk8 && !clk8_q) begin check(prev8 == 0 || cyc - prev8 == 768, "clk8 rising period"); prev8 = cyc; end
      if (clk8 && !clk8_q) high8 = 0;
      if (clk8) high8++;
      if (!clk8 && clk8_q && prev8 != 0) check(high8 == 384, $sformatf("clk8 high time %0d", high8));
    end
    clk8_q  = clk8;
    clk32_q = clk32;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);
    check(!clk8 && !clk32 && !stb8 && !stb32, "held while en low");
    en = 1;
    repeat (768 * 12) @(posedge clk);
    check(n8 >= 11, "enough stb8");
    check(n32 >= 47, "enough stb32");
    en = 0;
    @(posedge clk); @(posedge clk);
    check(!clk8 && !clk32, "cleared when en drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
