// tb_dpll_fm: the loop following a frequency-modulated carrier at the
// highest modulating frequency of the design point, Omega_H = 103*pi rad/s
// (51.5 Hz), with a peak deviation of 100 Hz.
//
// li = round(127 cos(phi)), dphi/dt = 2*pi*(10 kHz + 100 Hz * sin(Omega_H t)).
// After 60 ms of settling, over four modulation periods:
//   - li and dout must show the same number of rising zero crossings
//     (no cycle slips),
//   - lf_out * 400/722 Hz is correlated with sin and cos of the modulation
//     to get the tracked deviation. Its amplitude must match the closed-loop
//     response of the linear loop, |H(j Omega_H)| * 100 Hz, within 10 %, with
//     H(s) = (2 zeta w_n s + w_n^2) / (s^2 + 2 zeta w_n s + w_n^2),
//     w_n^2 = K/tau1, 2 zeta w_n = K tau2/tau1, and K = 2*pi * 4032 * 400/722
//     rad/s for a full-scale input (4032 LSB/rad detector gain,
//     400/722 Hz/LSB NCO gain).
// Runs about 140 ms of 80 MHz clock at the default parameters.
module tb_dpll_fm;
  import dpll_pkg::*;

  localparam real    PI       = 3.14159265358979;
  localparam real    FCLK     = 80.0e6;
  localparam real    FM       = 103.0 * PI / (2.0 * PI);   // 51.5 Hz
  localparam real    DEV      = 100.0;
  localparam real    HZ_LSB   = 400.0 / 722.0;
  localparam int     MS       = 80_000;
  localparam longint WATCHDOG = 64'd16_000_000;

  logic    clk = 1'b0;
  logic    rst_n;
  sample_t li;
  logic    li_sample;
  sample_t dout;
  word_t   pd_out, lf_out;

  dpll_top dut (.*);

  always #6.25ns clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  real phase = 0.0;                 // carrier cycles, wrapped
  real t = 0.0;                     // seconds since start

  always @(posedge clk) begin
    real f;
    cycles <= cycles + 1;
    t      <= t + 1.0 / FCLK;
    f      = 10000.0 + DEV * $sin(2.0 * PI * FM * t);
    phase  <= phase + f / FCLK - real'($rtoi(phase + f / FCLK));
  end

  always_comb begin
    real v;
    v  = 127.0 * $cos(2.0 * PI * phase);
    li = sample_t'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int  zl = 0, zd = 0, n = 0, window;
    real cs = 0.0, sn = 0.0, amp, k, tau1, tau2, wn2, two_zw, w, h;
    sample_t lp, dp;

    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (60 * MS) @(posedge clk);

    window = $rtoi(4.0 / FM * FCLK);
    #1 lp = li; dp = dout;
    repeat (window) begin
      @(posedge clk); #1;
      if (lp < 0 && li >= 0) zl++;
      if (dp < 0 && dout >= 0) zd++;
      lp = li; dp = dout;
      if (li_sample) begin
        sn += real'(lf_out) * HZ_LSB * $sin(2.0 * PI * FM * t);
        cs += real'(lf_out) * HZ_LSB * $cos(2.0 * PI * FM * t);
        n++;
      end
    end
    amp = 2.0 * $sqrt(sn * sn + cs * cs) / real'(n);

    tau1   = 0.10053;
    tau2   = 0.009;
    k      = 2.0 * PI * 4032.0 * HZ_LSB;
    wn2    = k / tau1;
    two_zw = k * tau2 / tau1;
    w      = 2.0 * PI * FM;
    h      = $sqrt(wn2 * wn2 + (two_zw * w) ** 2) / $sqrt((wn2 - w * w) ** 2 + (two_zw * w) ** 2);

    $display("zero crossings li=%0d dout=%0d; tracked deviation %0.1f Hz, linear model %0.1f Hz",
             zl, zd, amp, h * DEV);
    check(zl - zd <= 1 && zd - zl <= 1, "cycle slip under modulation");
    check(amp > 0.9 * h * DEV && amp < 1.1 * h * DEV, "tracked deviation differs from the loop response");
    check(amp > 0.5 * DEV, "loop does not follow the modulation");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= WATCHDOG);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
