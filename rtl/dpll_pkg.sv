// dpll_pkg: word types and constants shared by the digital PLL.
//
// All sample words are signed two's complement. The input carrier and the
// NCO output are 8-bit samples in [-127,127]; the phase-detector and
// loop-filter words are 16 bits wide. The rate constants divide the 80 MHz
// system clock into the three sample rates the loop runs at: 320 kHz for the
// 32-point, 10 kHz NCO carrier (250 clocks per point), 50 kHz for the loop
// filter (c = 2/T = 100 kHz in its bilinear transform) and 640 kHz for the
// phase detector's low-pass. The low-pass was derived for c = 1.275 MHz
// (637.5 kHz); 640 kHz is the nearest integer division of the clock, and the
// filter's shift form (a = 255) does not depend on it.
package dpll_pkg;

  typedef logic signed [7:0]  sample_t;   // carrier and NCO samples
  typedef logic signed [15:0] word_t;     // phase error and frequency control

  localparam int unsigned CLK_HZ     = 80_000_000;
  localparam int unsigned CARRIER_HZ = 10_000;
  localparam int unsigned NCO_POINTS = 32;
  localparam int unsigned NCO_DIV    = CLK_HZ / (CARRIER_HZ * NCO_POINTS);  // 250
  localparam int unsigned LF_DIV     = 1600;   // 50 kHz loop-filter rate
  localparam int unsigned PD_DIV     = 125;    // 640 kHz low-pass rate

  localparam int          SAMPLE_MAX = 127;
  localparam int          LF_LIMIT   = 722;    // loop-filter output range
  localparam int unsigned OFFSET_MAX_HZ = 400; // |dw| < 800*pi rad/s

endpackage
