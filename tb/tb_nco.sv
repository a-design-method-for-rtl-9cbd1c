// tb_nco: checks the carrier-plus-offset NCO.
//  - tick comes every 250 clocks (32 points x 250 clocks = 10 kHz at 80 MHz).
//  - ctrl = 0: dout repeats every 32 ticks and equals round(127 cos) scaled
//    by 127/128, i.e. the carrier alone (values worked out here with reals).
//  - ctrl = +722, +361, +90, -722: counting rising zero crossings over 20 ms
//    gives the frequency 10 kHz + ctrl * 400/722 Hz within one crossing
//    (the +-722 ends are the +-400 Hz limits of the offset).
//  - dout always stays in [-127,127] and reaches at least +-120.
module tb_nco;
  import dpll_pkg::*;

  localparam int MS = 80_000;

  logic    clk = 1'b0;
  logic    rst_n;
  word_t   ctrl;
  logic    tick;
  sample_t dout;

  nco dut (.*);

  always #6.25ns clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_freq(input int c);
    int zc = 0, mx = -200, mn = 200;
    real f_exp, zc_exp;
    sample_t prev;
    ctrl = word_t'(c);
    repeat (2 * MS) @(posedge clk);
    #1 prev = dout;
    repeat (20 * MS) begin
      @(posedge clk); #1;
      if (prev < 0 && dout >= 0) zc++;
      prev = dout;
      if (dout > mx) mx = dout;
      if (dout < mn) mn = dout;
    end
    f_exp  = 10000.0 + real'(c) * 400.0 / 722.0;
    zc_exp = f_exp * 0.020;
    $display("ctrl=%0d: %0d crossings in 20 ms, expected %0.1f (%0.1f Hz); range [%0d,%0d]",
             c, zc, zc_exp, f_exp, mn, mx);
    check(real'(zc) > zc_exp - 1.01 && real'(zc) < zc_exp + 1.01, $sformatf("ctrl=%0d frequency", c));
    check(mx <= 127 && mn >= -127, "dout out of range");
    check(mx >= 120 && mn <= -120, "dout amplitude too small");
  endtask

  initial begin
    int last_tick, t_prev;
    rst_n = 1'b0; ctrl = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Tick spacing.
    t_prev = -1;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk iff tick);
      if (t_prev >= 0) check(cycles - t_prev == 250, $sformatf("tick spacing %0d", cycles - t_prev));
      t_prev = cycles;
    end

    // Carrier alone: compare 64 consecutive outputs with the expected cosine.
    // After k ticks since reset dout holds the sample computed at carrier
    // index k-1.
    for (int k = 0; k < 64; k++) begin
      int idx, e;
      real v, w;
      @(posedge clk iff tick); #1;
      // 41 + k ticks so far.
      idx = (41 + k - 1) % 32;
      v = 127.0 * $cos(2.0 * 3.14159265358979 * real'(idx) / 32.0);
      w = real'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5)) * 127.0 / 128.0;
      e = $rtoi(w < 0.0 ? w - 1.0 : w);   // arithmetic shift rounds down
      check(int'(dout) == e, $sformatf("carrier sample %0d: dout=%0d expected %0d", idx, dout, e));
    end

    run_freq(0);
    run_freq(722);
    run_freq(361);
    run_freq(90);
    run_freq(-722);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 20_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
