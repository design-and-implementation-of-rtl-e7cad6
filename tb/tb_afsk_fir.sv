// tb_afsk_fir: checks both band-pass filters. The testbench derives the
// signed-char coefficients itself from the real-valued filter designs
// (round(c * 127)), runs random and full-scale samples through a reference
// convolution, and compares each output (sum >>> 7, saturated) and the
// one-clock latency of out_valid.
module tb_afsk_fir;
  localparam logic signed [7:0] C2200 [7] = '{8'sd11, -8'sd27, -8'sd11, 8'sd42, -8'sd11, -8'sd27, 8'sd11};
  real r1200 [7] = '{-0.158347, -0.077582, 0.155284, 0.298433, 0.155284, -0.077582, -0.158347};
  real r2200 [7] = '{0.083486, -0.210826, -0.083486, 0.333607, -0.083486, -0.210826, 0.083486};
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [7:0] x = 0, y1, y2;
  logic v1, v2;
  int checks = 0, failures = 0;
  int c1 [7], c2 [7];
  int hist [7];

  afsk_fir u1 (.clk, .rst, .in_valid, .x, .y(y1), .out_valid(v1));   // default: 1200 Hz
  afsk_fir #(.COEF(C2200)) u2 (.clk, .rst, .in_valid, .x, .y(y2), .out_valid(v2));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out(input int c [7]);
    int s = 0;
    for (int k = 0; k < 7; k++) s += c[k] * hist[k];
    s = s >>> 7;
    if (s > 127) s = 127;
    if (s < -128) s = -128;
    return s;
  endfunction

  initial begin
    int e1, e2;
    for (int k = 0; k < 7; k++) begin
      c1[k] = int'($floor(r1200[k] * 127.0 + 0.5));
      c2[k] = int'($floor(r2200[k] * 127.0 + 0.5));
      hist[k] = 0;
    end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      if (n < 40) x = (n % 2) ? 8'sd127 : -8'sd128;      // drives saturation
      else if (n < 60) x = -8'sd128;
      else x = 8'($urandom);
      in_valid = 1;
      for (int k = 6; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      e1 = ref_out(c1);
      e2 = ref_out(c2);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!v1 || !v2 || y1 != 8'(e1) || y2 != 8'(e2)) begin
        failures++;
        $display("FAIL n=%0d: y1=%0d (exp %0d) y2=%0d (exp %0d) v=%b%b", n, y1, e1, y2, e2, v1, v2);
      end
      @(negedge clk);
      checks++;
      if (v1 || v2) begin failures++; $display("FAIL: out_valid longer than one clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
