// tb_ax25_filter: drives random bits into the majority filter on random
// strobes and compares its output after each strobe with a count of ones in
// the last five samples kept by the testbench.
module tb_ax25_filter;
  logic clk = 0, rst = 1, en = 0, din = 0, dout;
  int checks = 0, failures = 0;
  bit hist [$];

  ax25_filter dut (.clk, .rst, .en, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int i = 0; i < 5; i++) hist.push_back(0);
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      din = $urandom_range(0, 1);
      en  = ($urandom_range(0, 2) != 0);
      if (en) begin
        hist.push_back(din);
        void'(hist.pop_front());
      end
      @(negedge clk);
      en = 0;
      ones = 0;
      foreach (hist[i]) ones += hist[i];
      checks++;
      if (dout !== (ones > 2)) begin
        failures++;
        $display("FAIL step %0d: ones=%0d dout=%0b", n, ones, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
