// tb_phase_detector: checks the multiplier phase detector two ways.
//  1. Bit-exact: a model written here (product halved, then two sections of
//     s += x + x_prev - s/128, y = s/256) must match pd_out after every
//     sample strobe, for random li and nco samples.
//  2. Behaviour: with li = 127 cos(wt) and nco = 127 cos(wt - p) at 10 kHz,
//     sampled at 640 kHz, the settled mean of pd_out must be
//     127*127/4 * cos(p) (about 4032 cos p) within 2 %, for several p, and
//     the residual 20 kHz ripple must be small.
// en is pulsed every fourth clock; pd_out lags the samples by three
// strobes plus one clock (mixer register and two filter stages).
module tb_phase_detector;
  import dpll_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    en;
  sample_t li, nco;
  word_t   pd_out;

  phase_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  // Reference state.
  longint m_q, s1, s2, x1p, x2p;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint asr(longint v, int n);
    return v >>> n;
  endfunction

  task automatic sample(input int l, input int c, input bit compare);
    longint y1_old, y2_old;
    li = sample_t'(l); nco = sample_t'(c); en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    // The mixer register and both stages update on the same edge.
    y1_old = asr(s1, 8);
    s2  = s2 + y1_old + x2p - asr(s2, 7);
    x2p = y1_old;
    s1  = s1 + m_q + x1p - asr(s1, 7);
    x1p = m_q;
    m_q = asr(longint'(l * c), 1);
    if (compare) check(longint'(pd_out) == asr(s2, 8),
                       $sformatf("pd_out=%0d expected %0d", pd_out, asr(s2, 8)));
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; li = '0; nco = '0;
    m_q = 0; s1 = 0; s2 = 0; x1p = 0; x2p = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int n = 0; n < 3000; n++)
      sample(int'($urandom_range(254)) - 127, int'($urandom_range(254)) - 127, 1'b1);

    for (int k = 0; k < 5; k++) begin
      real p, sum, mx, mn, expct, v1, v2;
      int  cnt;
      p = real'(k) * 3.14159265358979 / 4.0;   // 0, 45, 90, 135, 180 degrees
      sum = 0.0; cnt = 0; mx = -1.0e9; mn = 1.0e9;
      for (int n = 0; n < 12800; n++) begin
        v1 = 127.0 * $cos(2.0 * 3.14159265358979 * 10000.0 * real'(n) / 640000.0);
        v2 = 127.0 * $cos(2.0 * 3.14159265358979 * 10000.0 * real'(n) / 640000.0 - p);
        sample($rtoi(v1 < 0.0 ? v1 - 0.5 : v1 + 0.5), $rtoi(v2 < 0.0 ? v2 - 0.5 : v2 + 0.5), 1'b1);
        if (n >= 6400) begin
          sum += real'(pd_out); cnt++;
          if (real'(pd_out) > mx) mx = real'(pd_out);
          if (real'(pd_out) < mn) mn = real'(pd_out);
        end
      end
      expct = 127.0 * 127.0 / 4.0 * $cos(p);
      $display("phase %0d deg: mean %0.1f expected %0.1f ripple %0.1f", k * 45, sum / cnt, expct, mx - mn);
      check(sum / cnt > expct - 81.0 && sum / cnt < expct + 81.0, "mean not proportional to cos(phase)");
      check(mx - mn < 200.0, "double-frequency ripple not removed");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 1_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
