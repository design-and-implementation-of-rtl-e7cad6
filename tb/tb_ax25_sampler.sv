// tb_ax25_sampler: feeds the sampler a random NRZ stream, 32 strobes per bit,
// with the first edge arriving while the counter lags (counter above 16).
// Checks that the extra +1 step happens, that the phase then settles so the
// SAMPLE edge lands in the middle half of each bit, that every bit_val equals
// the bit being sent, and that bit strobes come every 32 strobes once
// settled. A second run starts with a leading phase, where the original design's
// rule makes no correction, and checks that the sampling point then stays
// where it is (no drift) and still reads every bit.
module tb_ax25_sampler;
  logic clk = 0, rst = 1, en = 0, din = 0;
  logic sample, bit_stb, bit_val;
  int checks = 0, failures = 0;
  int extra_steps = 0;

  ax25_sampler dut (.clk, .rst, .en, .din, .sample, .bit_stb, .bit_val);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one strobe every 4 clocks; tick counts strobes
  int tick = 0;
  bit cur_bit;
  int pos;         // strobe position inside the current bit, 0..31
  int last_stb_tick = -1;
  bit settled;
  int first_pos = -1;
  bit leading_run;

  task automatic run(input int offset, input int nbits, input bit lead);
    bit b;
    rst = 1; tick = 0; last_stb_tick = -1; settled = 0; first_pos = -1; leading_run = lead;
    din = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // idle strobes so the counter reaches 'offset' before the first edge
    for (int i = 0; i < offset; i++) begin
      @(negedge clk); en = 1; @(negedge clk); en = 0;
    end
    for (int n = 0; n < nbits; n++) begin
      b = (n == 0) ? 1'b1 : 1'($urandom_range(0, 1));
      for (int p = 0; p < 32; p++) begin
        @(negedge clk);
        din = b; cur_bit = b; pos = p; settled = (n > 40);
        en = 1;
        @(negedge clk);
        en = 0;
        tick++;
      end
    end
  endtask

  always @(posedge clk) begin
    if (!rst && en && din != dut.din_q && dut.cnt > 5'd16) extra_steps++;
    if (bit_stb && settled) begin
      check(bit_val == cur_bit, $sformatf("bit value at pos %0d", pos));
      if (!leading_run) check(pos >= 8 && pos <= 24, $sformatf("sampling point %0d outside mid-bit", pos));
      else begin
        if (first_pos < 0) first_pos = pos;
        check(pos == first_pos, "sampling point drifted");
      end
      if (last_stb_tick >= 0) check(tick - last_stb_tick == 32, $sformatf("bit period %0d", tick - last_stb_tick));
      last_stb_tick = tick;
    end
  end

  initial begin
    // lagging: counter is 24 when the first edge arrives
    run(24, 200, 0);
    check(extra_steps > 0, "no phase correction happened");
    $display("phase corrections: %0d", extra_steps);
    // leading: counter is 6 at the first edge, no correction expected
    extra_steps = 0;
    run(6, 100, 1);
    check(extra_steps == 0, "correction while leading");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
