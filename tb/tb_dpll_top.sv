// tb_dpll_top: end-to-end test of the digital PLL at its default sizes.
//
// A real-valued sine source plays the A/D converter: li = round(127*cos(ph))
// with ph advanced every 80 MHz clock, so frequency steps keep the phase
// continuous. Each scenario waits for the loop to settle and then measures,
// over a window of whole milliseconds:
//   - rising zero crossings of li and dout (frequencies must match within 1),
//   - the mean loop-filter output, which must equal the input's offset from
//     10 kHz divided by the NCO gain of 400/722 Hz per LSB,
//   - the mean of li*dout, which must be near zero in lock (the multiplier
//     phase detector settles at a 90 degree offset).
// Scenarios: the +50 Hz input (10.050 kHz), a 60 degree phase step and a
// frequency step from +50 Hz to +200 Hz while locked (a second-order loop
// tracks both with no steady error), a -50 Hz input, and a +420 Hz input
// just beyond the +-400 Hz NCO range, which must drive the loop filter into
// its +-722 clamp. Each mechanism (lock above and below the carrier,
// re-lock after a phase step and after a frequency step, clamp) is counted
// and must happen at least once. Runs about 370 ms of 80 MHz clock.
module tb_dpll_top;
  import dpll_pkg::*;

  localparam real    FCLK      = 80.0e6;
  localparam real    HZ_PER_LSB = 400.0 / 722.0;
  localparam int     MS        = 80_000;           // clocks per millisecond
  localparam longint WATCHDOG  = 64'd40_000_000;   // 500 ms of clock

  logic    clk = 1'b0;
  logic    rst_n;
  sample_t li;
  logic    li_sample;
  sample_t dout;
  word_t   pd_out, lf_out;

  dpll_top dut (.*);

  always #6.25ns clk = ~clk;

  int checks = 0, failures = 0;
  int n_lock_pos = 0, n_lock_neg = 0, n_relock = 0, n_phase = 0, n_clamp = 0;
  longint cycles = 0;

  real f_in  = 10050.0;
  real phase = 0.0;       // in cycles of the input carrier
  real phase_ofs = 0.0;   // phase steps applied by the stimulus, in cycles

  always_ff @(posedge clk) begin
    cycles <= cycles + 1;
    phase  <= phase + f_in / FCLK - real'($rtoi(phase + f_in / FCLK));
  end

  always_comb begin
    real v;
    v  = 127.0 * $cos(2.0 * 3.14159265358979 * (phase + phase_ofs));
    li = sample_t'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure over ms milliseconds: zero crossings, mean lf_out, mean li*dout.
  task automatic measure(input int ms, output int zc_li, output int zc_do,
                         output real lf_mean, output real mix_mean, output int lf_max);
    sample_t li_p, do_p;
    real lf_sum = 0.0, mix_sum = 0.0;
    int n = 0;
    zc_li = 0; zc_do = 0; lf_max = 0;
    li_p = li; do_p = dout;
    repeat (ms * MS) begin
      @(posedge clk);
      if (li_p < 0 && li >= 0) zc_li++;
      if (do_p < 0 && dout >= 0) zc_do++;
      li_p = li; do_p = dout;
      if (li_sample) begin
        lf_sum  += real'(lf_out);
        mix_sum += real'(int'(li) * int'(dout));
        if (lf_out > lf_max) lf_max = lf_out;
        n++;
      end
    end
    lf_mean  = lf_sum / n;
    mix_mean = mix_sum / n;
  endtask

  task automatic expect_lock(input real f, input string name, output bit ok);
    int zl, zd, lmax;
    real lm, mm, lf_exp;
    measure(20, zl, zd, lm, mm, lmax);
    lf_exp = (f - 10000.0) / HZ_PER_LSB;
    $display("%s: f_in=%0.1f Hz  crossings li=%0d dout=%0d  lf_mean=%0.2f (expect %0.2f)  mean(li*dout)=%0.1f",
             name, f, zl, zd, lm, lf_exp, mm);
    ok = 1'b1;
    if ((zl - zd) > 1 || (zd - zl) > 1) ok = 1'b0;
    check((zl - zd) <= 1 && (zd - zl) <= 1, {name, ": dout frequency differs from li"});
    if (lm - lf_exp > 2.0 || lf_exp - lm > 2.0) ok = 1'b0;
    check(lm - lf_exp <= 2.0 && lf_exp - lm <= 2.0, {name, ": loop-filter output not at the offset"});
    if (mm > 800.0 || mm < -800.0) ok = 1'b0;
    check(mm <= 800.0 && mm >= -800.0, {name, ": not in quadrature lock"});
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    bit ok;
    int zl, zd, lmax;
    real lm, mm;

    // 1. The 10.050 kHz input of the hardware test.
    f_in = 10050.0;
    do_reset();
    repeat (60 * MS) @(posedge clk);
    expect_lock(f_in, "plus50", ok);
    if (ok) n_lock_pos++;

    // 2. Phase step of 60 degrees while locked: the loop must return to the
    //    same frequency control with no phase error left.
    phase_ofs = 1.0 / 6.0;
    repeat (60 * MS) @(posedge clk);
    expect_lock(f_in, "phase60", ok);
    if (ok) n_phase++;

    // 3. Frequency step while locked: +50 Hz -> +200 Hz.
    f_in = 10200.0;
    repeat (60 * MS) @(posedge clk);
    expect_lock(f_in, "step200", ok);
    if (ok) n_relock++;

    // 4. Below the carrier.
    f_in = 9950.0;
    do_reset();
    repeat (60 * MS) @(posedge clk);
    expect_lock(f_in, "minus50", ok);
    if (ok) n_lock_neg++;

    // 5. Beyond the NCO's +-400 Hz range: the loop filter must clamp.
    f_in = 10420.0;
    do_reset();
    repeat (60 * MS) @(posedge clk);
    measure(10, zl, zd, lm, mm, lmax);
    $display("plus420: lf_max=%0d lf_mean=%0.1f crossings li=%0d dout=%0d", lmax, lm, zl, zd);
    check(lmax == LF_LIMIT, "plus420: loop filter did not reach its clamp");
    check(lmax <= LF_LIMIT, "plus420: loop filter exceeded its clamp");
    check(lm > 700.0, "plus420: loop filter not held at its clamp");
    if (lmax == LF_LIMIT) n_clamp++;

    $display("mechanisms: lock_above=%0d lock_below=%0d relock_after_phase_step=%0d relock_after_freq_step=%0d lf_clamp=%0d",
             n_lock_pos, n_lock_neg, n_phase, n_relock, n_clamp);
    check(n_lock_pos > 0, "lock above the carrier never happened");
    check(n_lock_neg > 0, "lock below the carrier never happened");
    check(n_phase    > 0, "re-lock after a phase step never happened");
    check(n_relock   > 0, "re-lock after a frequency step never happened");
    check(n_clamp    > 0, "loop-filter clamp never happened");

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
