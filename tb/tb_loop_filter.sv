// tb_loop_filter: checks the PI loop filter against a real-valued model of
//     y(n) = y(n-1) + 901/10053 x(n) - 899/10053 x(n-1),
// with the accumulator clamped to [-722,722]. The output is the integer
// part (rounded toward minus infinity) of a fixed-point accumulator whose
// coefficients are rounded to 2^-20, so it must lie within two LSBs below
// and one above the exact model. Stimulus: a step (proportional jump of
// 900/10053 and integral ramp of 2/10053 per sample), random phase errors,
// and long constant errors of both signs that drive the clamp at +722 and
// -722. The output must change only on the clock after en.
module tb_loop_filter;
  import dpll_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  en;
  word_t x, y;

  loop_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_pos_clamp = 0, n_neg_clamp = 0;
  real acc = 0.0, xp = 0.0;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input int xi);
    word_t y_before;
    x = word_t'(xi); en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    acc = acc + 901.0 / 10053.0 * real'(xi) - 899.0 / 10053.0 * xp;
    if (acc > 722.0)  acc = 722.0;
    if (acc < -722.0) acc = -722.0;
    xp = real'(xi);
    check(real'(y) <= acc + 1.0 && real'(y) >= acc - 2.0,
          $sformatf("y=%0d expected floor of %0.4f", y, acc));
    if (y == 16'sd722)  n_pos_clamp++;
    if (y == -16'sd722) n_neg_clamp++;
    y_before = y;
    @(posedge clk); #1;
    check(y == y_before, "output moved without en");
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(y == 16'sd0, "reset value");

    // Step of 1000: first output 89 (901/10053*1000 = 89.6), then +0.199/sample.
    step(1000);
    check(y == 16'sd89, $sformatf("proportional jump %0d", y));
    for (int n = 0; n < 100; n++) step(1000);
    check(y == 16'sd109, $sformatf("after 101 samples %0d (89.6 + 100*0.199)", y));
    for (int n = 0; n < 101; n++) step(0);

    for (int n = 0; n < 5000; n++) step(int'($urandom_range(16128)) - 8064);

    for (int n = 0; n < 3000; n++) step(8064);
    for (int n = 0; n < 6000; n++) step(-8064);
    check(n_pos_clamp > 0, "positive clamp never reached");
    check(n_neg_clamp > 0, "negative clamp never reached");

    $display("clamp at +722: %0d samples, at -722: %0d samples", n_pos_clamp, n_neg_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= 200_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
