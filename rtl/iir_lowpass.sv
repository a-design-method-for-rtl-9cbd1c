// iir_lowpass: first-order IIR low-pass built from shifts and additions.
//
// The analog RC section H(s) = 1/(1 + s*tau), bilinear-transformed with
// c*tau = a, gives
//     y(n) = (a-1)/(a+1) * y(n-1) + 1/(a+1) * [x(n) + x(n-1)].
// Choosing a + 1 = 2^N_SHIFT removes every multiplier and divider:
//     2^N * y(n) = 2^N * y(n-1) + x(n) + x(n-1) - 2*y(n-1).
// The state register holds s = 2^N * y, so the fractional bits of y are kept
// and no dead band appears; 2*y(n-1) is s shifted right by N-1, and the output
// is s shifted right by N. DC gain is one. With N_SHIFT = 8 (a = 255) and a
// 640 kHz sample rate (c = 2/T = 1.28 MHz) the section equals an RC time
// constant of a/c, about 2e-4 s: a -3 dB corner near 800 Hz, and about
// -28 dB at 20 kHz, twice the locked carrier.
//
// Interface: x is taken and the state advanced on each clock where en is
// high; y changes on the clock after en (one sample of latency through the
// register). Reset clears the state and the held x(n-1). The word widths and
// the reset behaviour are this design's choices.
module iir_lowpass #(
  parameter int unsigned N_SHIFT = 8,
  parameter int unsigned XW      = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  output logic signed [XW-1:0] y
);
  localparam int unsigned SW = XW + N_SHIFT + 2;   // state width, with headroom

  logic signed [SW-1:0] s_q;       // 2^N * y(n-1)
  logic signed [XW-1:0] x_prev_q;  // x(n-1)
  logic signed [SW-1:0] s_next;

  always_comb begin
    s_next = s_q + SW'(x) + SW'(x_prev_q) - (s_q >>> (N_SHIFT - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q      <= '0;
      x_prev_q <= '0;
    end else if (en) begin
      s_q      <= s_next;
      x_prev_q <= x;
    end
  end

  assign y = XW'(s_q >>> N_SHIFT);
endmodule
