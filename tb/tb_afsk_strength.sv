// tb_afsk_strength: random signed inputs (including -128) through the
// rectifier and weighting low-pass; each level is compared with the
// testbench's own level/2 + |x|/2 computed in integers.
module tb_afsk_strength;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [7:0] x = 0;
  logic [6:0] level;
  logic out_valid;
  int checks = 0, failures = 0;

  afsk_strength dut (.clk, .rst, .in_valid, .x, .level, .out_valid);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lvl = 0, a;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      x = (n < 30) ? -8'sd128 : ((n < 60) ? 8'sd0 : 8'($urandom));
      in_valid = ($urandom_range(0, 3) != 0);
      a = (x < 0) ? -int'(x) : int'(x);
      if (a > 127) a = 127;
      if (in_valid) lvl = lvl / 2 + a / 2;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (int'(level) != lvl) begin failures++; $display("FAIL n=%0d: level %0d expected %0d", n, level, lvl); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
