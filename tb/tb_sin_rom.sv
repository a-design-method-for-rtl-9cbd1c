// tb_sin_rom: checks every entry of the 32-point carrier table and the
// 1024-point offset table against round(127*sin(2*pi*i/N)) computed here
// with real arithmetic, and checks the quarter-period cosine relation and
// the [-127,127] range.
module tb_sin_rom;
  logic        [4:0] a5;
  logic signed [7:0] d5;
  logic        [9:0] a10;
  logic signed [7:0] d10;

  sin_rom #(.AW(5))  u5  (.addr(a5),  .data(d5));
  sin_rom #(.AW(10)) u10 (.addr(a10), .data(d10));

  int checks = 0, failures = 0;

  function automatic int ref_sin(int i, int n);
    real v = 127.0 * $sin(2.0 * 3.14159265358979 * real'(i) / real'(n));
    return $rtoi(v < 0.0 ? v - 0.5 : v + 0.5);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int minv = 0, maxv = 0;
    for (int i = 0; i < 32; i++) begin
      a5 = 5'(i); #1;
      check(int'(d5) == ref_sin(i, 32), $sformatf("32-point entry %0d: %0d", i, d5));
    end
    for (int i = 0; i < 1024; i++) begin
      a10 = 10'(i); #1;
      check(int'(d10) == ref_sin(i, 1024), $sformatf("1024-point entry %0d: %0d", i, d10));
      if (d10 < minv) minv = d10;
      if (d10 > maxv) maxv = d10;
    end
    check(maxv == 127 && minv == -127, "range is not [-127,127]");
    // cos(0) = sin(pi/2) = 127 and sin(pi) = 0.
    a5 = 5'd8;  #1; check(d5 == 8'sd127, "32-point quarter period");
    a5 = 5'd16; #1; check(d5 == 8'sd0,   "32-point half period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
