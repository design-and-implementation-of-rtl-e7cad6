// tb_ax25_monitor: end-to-end test of the whole monitor with every parameter
// at its default (7.3728 MHz, 1200 baud, 921-clock ADC period, 115200-baud
// UART). A testbench ADC produces phase-continuous AFSK audio (1200 Hz for a
// one, 2200 Hz for a zero in positive mode, swapped in negative mode) for
// a flag preamble, a bit-stuffed frame and closing flags, followed by
// silence. A third frame is loaded into the test bitstream generator and
// sent with test_mode set. Checks every decoded octet, the UART line of each
// frame and the LCD contents, and counts the mechanisms the design has:
// signal detection (ENABLE rising and falling), flags, stuffed zeros,
// sampler phase corrections, filter glitch removal, LCD clears, lines ended
// by loss of signal, negative mode, test mode and stopping the receiver
// (run low: a tone must start no conversion and raise no ENABLE until run
// is set again). A mechanism that never
// happened counts as a failure.
module tb_ax25_monitor;
  localparam int  BIT_CLKS = 6144;
  localparam int  UART_CPB = 64;
  localparam real FS = 7372800.0 / 921.0;
  logic clk = 0, rst = 1;
  logic adc_start, adc_valid = 0;
  logic [11:0] adc_data = 12'd2048;
  logic run = 1, negative = 0, test_mode = 0, gen_wr = 0, gen_flag = 0, gen_go = 0;
  logic [7:0] gen_octet = 0;
  logic gen_busy, data, enable, txd, lrs, lrw, le;
  logic [7:0] ld, octet;
  logic octet_valid, flag_seen;
  int checks = 0, failures = 0;

  ax25_monitor dut (
    .clk, .rst, .run, .adc_start, .adc_valid, .adc_data, .negative, .test_mode,
    .gen_wr, .gen_flag, .gen_octet, .gen_go, .gen_busy, .data, .enable,
    .txd_232(txd), .lrs, .lrw, .le, .ld, .octet, .octet_valid, .flag_seen);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  int n_en_rise = 0, n_en_fall = 0, n_flags = 0, n_destuff = 0, n_corr = 0, n_glitch = 0;
  int n_lcd_clear = 0, n_lost_lines = 0, n_neg = 0, n_test = 0, n_stopped = 0, n_stop_bad = 0;
  logic enable_q = 0;
  always @(posedge clk) if (!rst) begin
    if (enable && !enable_q) n_en_rise++;
    if (!enable && enable_q) n_en_fall++;
    enable_q <= enable;
    if (flag_seen) n_flags++;
    if (dut.u_decoder.u_deser.stb_d && dut.u_decoder.u_deser.in_frame && !dut.u_decoder.u_deser.frame &&
        dut.u_decoder.u_deser.ones == 3'd5 && !dut.u_decoder.u_deser.din_d) n_destuff++;
    if (dut.u_decoder.u_sampler.en && dut.u_decoder.u_sampler.edge_seen && dut.u_decoder.u_sampler.cnt > 5'd16) n_corr++;
    // filter output disagrees with a lone sample: a glitch was voted away
    if (dut.u_decoder.u_filter.en && (dut.u_decoder.u_filter.window[0] != dut.u_decoder.u_filter.window[1]) &&
        (dut.u_decoder.u_filter.window[1] == dut.u_decoder.u_filter.window[2]) &&
        (dut.u_decoder.u_filter.window[0] != dut.u_decoder.u_filter.hist[3])) n_glitch++;
    if (dut.u_decoder.u_serial.push && dut.u_decoder.u_serial.push_data[8] && !enable) n_lost_lines++;
  end

  // ---------------- octet check ----------------
  logic [7:0] expq [$];
  always @(posedge clk) if (!rst && octet_valid) begin
    if (expq.size() == 0) check(0, $sformatf("unexpected octet %h", octet));
    else begin
      automatic logic [7:0] e = expq.pop_front();
      check(octet == e, $sformatf("octet %h expected %h", octet, e));
    end
  end

  // ---------------- UART receiver and LCD bus monitor ----------------
  string got = "", exp_s = "";
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
  logic [8:0] lcd_w [$];
  logic le_q = 0;
  always @(posedge clk) begin
    if (!le && le_q) begin
      lcd_w.push_back({lrs, ld});
      if ({lrs, ld} == 9'h001) n_lcd_clear++;
    end
    le_q <= le;
  end
  function automatic string lcd_line();
    string s = "";
    int i0 = -1;
    foreach (lcd_w[i]) if (lcd_w[i] == 9'h080) i0 = i;
    if (i0 >= 0) for (int i = i0 + 1; i < lcd_w.size(); i++) if (lcd_w[i][8]) s = {s, string'(lcd_w[i][7:0])};
    return s;
  endfunction

  // ---------------- ADC model: AFSK audio ----------------
  real freq = 0.0, phase = 0.0, amp = 0.0;
  always @(posedge clk) if (adc_start && !rst) begin
    fork begin
      repeat (8) @(negedge clk);
      adc_data  = 12'(int'($floor(2048.0 + amp * $sin(phase) + 0.5)));
      phase     = phase + 2.0 * 3.14159265358979 * freq / FS;
      adc_valid = 1;
      @(negedge clk);
      adc_valid = 0;
    end join_none
  end

  // ---------------- frame building ----------------
  typedef logic [8:0] ent_q [$];   // {is_flag, octet}
  function automatic ent_q addr(input string call, input int ssid, input bit last);
    ent_q q;
    for (int i = 0; i < 6; i++) q.push_back({1'b0, (i < call.len() ? call[i] : 8'h20) << 1});
    q.push_back({1'b0, 8'h60 | 8'(ssid << 1) | 8'(last)});
    return q;
  endfunction
  function automatic ent_q flags(input int n);
    ent_q q;
    repeat (n) q.push_back(9'h100);
    return q;
  endfunction

  // one bit of audio
  task automatic audio_bit(input bit b);
    freq = (b ^ negative) ? 1200.0 : 2200.0;
    repeat (BIT_CLKS) @(negedge clk);
  endtask

  task automatic send_audio(input ent_q q);
    int ones = 0;
    amp = 1600.0;
    foreach (q[k]) begin
      if (q[k][8]) begin
        for (int i = 0; i < 8; i++) audio_bit(i != 0 && i != 7);
        ones = 0;
      end else begin
        expq.push_back(q[k][7:0]);
        for (int i = 0; i < 8; i++) begin
          audio_bit(q[k][i]);
          ones = q[k][i] ? ones + 1 : 0;
          if (ones == 5) begin audio_bit(0); ones = 0; end
        end
      end
    end
    amp = 0.0; freq = 0.0;
    repeat (BIT_CLKS * 20) @(negedge clk);
  endtask

  task automatic send_test(input ent_q q);
    foreach (q[k]) begin
      @(negedge clk); gen_wr = 1; gen_flag = q[k][8]; gen_octet = q[k][7:0];
      if (!q[k][8]) expq.push_back(q[k][7:0]);
    end
    @(negedge clk); gen_wr = 0;
    test_mode = 1;
    @(negedge clk); gen_go = 1; @(negedge clk); gen_go = 0;
    @(negedge clk);
    while (gen_busy) begin
      @(negedge clk);
      if (enable) n_test++;
    end
    repeat (BIT_CLKS * 10) @(negedge clk);
    test_mode = 0;
  endtask

  initial begin
    ent_q q;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (BIT_CLKS * 5) @(negedge clk);
    // frame 1: audio, positive mode, UI frame with repeater and stuffed octets
    q = {flags(20), addr("APRS", 0, 0), addr("OK1ABC", 7, 0), addr("WIDE1", 1, 1),
         9'h003, 9'h0F0, 9'h03E, 9'h0FF, 9'h021, 9'h07C, 9'h012, 9'h0C5, flags(3)};
    send_audio(q);
    exp_s = {exp_s, "APRS  0 < OK1ABC7 VIA WIDE1 1,PUI F0 3E FF 21 7C 12 C5\r\n"};
    check(lcd_line() == "APRS  0<OK1ABC7", {"LCD after frame 1: '", lcd_line(), "'"});
    // frame 2: audio, negative mode, I frame with P set
    negative = 1;
    q = {flags(20), addr("QSL", 0, 0), addr("SK9DEM", 0, 1), 9'h010, 9'h0F0, 9'h048, 9'h049,
         9'h0A7, 9'h3B, flags(3)};
    send_audio(q);
    n_neg++;
    negative = 0;
    exp_s = {exp_s, "QSL   0 < SK9DEM0,pI F0 48 49 A7 3B\r\n"};
    check(lcd_line() == "QSL   0<SK9DEM0", {"LCD after frame 2: '", lcd_line(), "'"});
    // frame 3: test bitstream generator, as the MCU's test command does
    q = {flags(4), addr("NJ7P", 0, 0), addr("N7LEM", 0, 1), 9'h03F, 9'h0FF, 9'h0FE, flags(2)};
    send_test(q);
    exp_s = {exp_s, "NJ7P  0 < N7LEM 0,pSABM FF FE\r\n"};
    check(lcd_line() == "NJ7P  0<N7LEM 0", {"LCD after frame 3: '", lcd_line(), "'"});
    // frame 4: audio that stops in the middle of the frame (signal lost)
    q = {flags(20), addr("CUT", 0, 0), addr("OFF", 0, 1), 9'h003, 9'h0F0};
    send_audio(q);
    exp_s = {exp_s, "CUT   0 < OFF   0,PUI F0\r\n"};
    repeat (20000) @(negedge clk);
    // stop the receiver, play a tone, then start it again with the tone on
    run = 0;
    amp = 1600.0; freq = 1200.0;
    repeat (BIT_CLKS * 10) begin
      @(negedge clk);
      n_stopped++;
      if (adc_start || enable) n_stop_bad++;
    end
    check(n_stop_bad == 0, $sformatf("%0d cycles with a conversion or ENABLE while stopped", n_stop_bad));
    run = 1;
    repeat (BIT_CLKS * 10) @(negedge clk);
    check(enable, "ENABLE after the receiver was started again");
    amp = 0.0; freq = 0.0;
    repeat (BIT_CLKS * 10) @(negedge clk);

    check(expq.size() == 0, $sformatf("%0d octets not received", expq.size()));
    check(got == exp_s, {"UART text:\n", got, "expected:\n", exp_s});
    $display("signal rises=%0d falls=%0d flags=%0d destuffed=%0d phase_corr=%0d glitches=%0d",
             n_en_rise, n_en_fall, n_flags, n_destuff, n_corr, n_glitch);
    $display("lcd_clears=%0d lines_ended_by_signal_loss=%0d negative_frames=%0d test_mode_cycles=%0d stopped_cycles=%0d",
             n_lcd_clear, n_lost_lines, n_neg, n_test, n_stopped);
    check(n_en_rise >= 3 && n_en_fall >= 3, "signal detection");
    check(n_flags > 0, "flag detection");
    check(n_destuff > 0, "bit destuffing");
    check(n_corr > 0, "sampler phase correction");
    check(n_glitch > 0, "filter glitch removal");
    check(n_lcd_clear >= 4, "LCD clear on signal");
    check(n_lost_lines > 0, "line ended by loss of signal");
    check(n_neg > 0, "negative mode");
    check(n_test > 0, "test mode");
    check(n_stopped > 0, "receiver stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
