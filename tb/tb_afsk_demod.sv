// tb_afsk_demod: a testbench ADC answers each adc_start with a 12-bit sample
// of a sine tone (amplitude 1600 around mid-scale, the rate set by the
// 921-clock conversion timer). Checks the conversion period, that a
// 1200 Hz tone gives DATA=1 and a 2200 Hz tone DATA=0 in positive mode and
// the reverse in negative mode, that ENABLE is high for either tone and low
// for silence, and that all of this holds for every sample once the filters
// have settled (12 samples after a change). With run low, no conversion may
// start and ENABLE must stay low while a tone is present; after run returns
// high the tone must be detected again.
module tb_afsk_demod;
  localparam real CLK_HZ = 7372800.0;
  localparam real FS = CLK_HZ / 921.0;
  logic clk = 0, rst = 1;
  logic adc_start, adc_valid = 0, negative = 0, run = 1, data, enable;
  logic [11:0] adc_data = 12'd2048;
  int checks = 0, failures = 0;
  real freq = 0.0, phase = 0.0, amp = 1600.0;
  int cyc = 0, last_start = -1, nsamp = 0;

  afsk_demod dut (.clk, .rst, .run, .adc_start, .adc_valid, .adc_data, .negative, .data, .enable);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model: result 8 clocks after the start strobe
  always @(posedge clk) begin
    cyc++;
    if (!run) check(!adc_start && !enable && !data, "conversion or output while stopped");
    if (adc_start && !rst) begin
      if (last_start >= 0) check(cyc - last_start == 921, $sformatf("conversion period %0d at cycle %0d sample %0d", cyc - last_start, cyc, nsamp));
      last_start = cyc;
      fork begin
        repeat (8) @(negedge clk);
        adc_data  = 12'(int'($floor(2048.0 + amp * $sin(phase) + 0.5)));
        phase     = phase + 2.0 * 3.14159265358979 * freq / FS;
        adc_valid = 1;
        @(negedge clk);
        adc_valid = 0;
        nsamp++;
      end join_none
    end
  end

  task automatic tone(input real f, input real a, input int samples, input bit exp_en, input bit exp_data);
    int first;
    freq = f; amp = a;
    first = nsamp;
    while (nsamp < first + samples) begin
      @(posedge adc_valid);
      repeat (4) @(negedge clk);
      if (nsamp >= first + 12) begin
        check(enable == exp_en, $sformatf("ENABLE=%0b for %0.0f Hz amp %0.0f", enable, f, a));
        if (exp_en) check(data == exp_data, $sformatf("DATA=%0b for %0.0f Hz, negative=%0b", data, f, negative));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    tone(0.0, 0.0, 40, 0, 0);
    tone(1200.0, 1600.0, 80, 1, 1);
    tone(2200.0, 1600.0, 80, 1, 0);
    tone(1200.0, 1600.0, 40, 1, 1);
    negative = 1;
    tone(2200.0, 1600.0, 80, 1, 1);
    tone(1200.0, 1600.0, 80, 1, 0);
    tone(0.0, 0.0, 40, 0, 0);
    // stop the receiver while a tone is present, then start it again
    freq = 1200.0; amp = 1600.0;
    run = 0;
    repeat (921 * 20) @(negedge clk);
    last_start = -1;
    run = 1;
    tone(1200.0, 1600.0, 40, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
