// tb_iir_lowpass: checks the shift-and-add low-pass against a real-valued
// model of y(n) = (a-1)/(a+1) y(n-1) + 1/(a+1) [x(n)+x(n-1)], a = 255.
// Stimulus: a step to 8000 (DC gain one), random samples in [-8064,8064],
// and a 20 kHz tone at the 640 kHz rate (attenuation of one section,
// |H| about 0.04, worked out from the transfer function). en is pulsed every third clock; y must be unchanged on
// clocks without en and must take its new value one clock after en.
module tb_iir_lowpass;
  logic               clk = 1'b0;
  logic               rst_n;
  logic               en;
  logic signed [15:0] x;
  logic signed [15:0] y;

  iir_lowpass dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  real a = 255.0;
  real y_ref = 0.0, x_prev = 0.0;

  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Apply one sample, advance the reference, compare after the update.
  task automatic step(input int xi, input real tol);
    logic signed [15:0] y_before;
    x = 16'(xi);
    en = 1'b1;
    y_before = y;
    @(posedge clk); #1;
    en = 1'b0;
    y_ref  = ((a - 1.0) * y_ref + real'(xi) + x_prev) / (a + 1.0);
    x_prev = real'(xi);
    check(real'(y) <= y_ref + tol && real'(y) >= y_ref - tol - 1.0,
          $sformatf("y=%0d expected %0.3f", y, y_ref));
    // No change without en.
    y_before = y;
    repeat (2) @(posedge clk);
    #1;
    check(y == y_before, "output moved without en");
  endtask

  initial begin
    real peak = 0.0;
    rst_n = 1'b0; en = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(y == 16'sd0, "reset value");

    for (int n = 0; n < 2000; n++) step(8000, 1.0);
    check(y >= 16'sd7998 && y <= 16'sd8000, $sformatf("DC gain: y=%0d for x=8000", y));

    for (int n = 0; n < 2000; n++) step(int'($urandom_range(16128)) - 8064, 1.0);

    for (int n = 0; n < 1000; n++) step(0, 1.0);
    for (int n = 0; n < 3200; n++) begin
      real v;
      v = 8000.0 * $sin(2.0 * 3.14159265358979 * 20000.0 * real'(n) / 640000.0);
      step($rtoi(v), 1.0);
      if (n > 1600 && real'(y) > peak) peak = real'(y);
    end
    // One section: |H(w)| = |1 + e^-jw| / |(a+1) - (a-1) e^-jw|, w = 2*pi*20/640.
    begin
      real w, num, den, h;
      w   = 2.0 * 3.14159265358979 * 20000.0 / 640000.0;
      num = $sqrt((1.0 + $cos(w)) ** 2 + $sin(w) ** 2);
      den = $sqrt(((a + 1.0) - (a - 1.0) * $cos(w)) ** 2 + ((a - 1.0) * $sin(w)) ** 2);
      h   = num / den;
      check(peak > 0.95 * 8000.0 * h && peak < 1.05 * 8000.0 * h + 2.0,
            $sformatf("20 kHz tone peak %0.0f, expected %0.0f", peak, 8000.0 * h));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 100000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
