// loop_filter: proportional-integral loop filter of the second-order loop.
//
// The analog filter F(s) = (1 + s*tau2) / (s*tau1) is mapped to the z domain
// with the bilinear transform s = c*(1 - z^-1)/(1 + z^-1):
//     y(n) = y(n-1) + (1 + c*tau2)/(c*tau1) * x(n)
//                   + (1 - c*tau2)/(c*tau1) * x(n-1).
// For the design point (w_n = 50*pi rad/s, zeta = 0.707, K = 2*pi*400 rad/s,
// c = 100 kHz, i.e. a 50 kHz sample rate) c*tau1 = 10053 and c*tau2 = 900,
// so the coefficients are +901/10053 and -899/10053. Their sum, 2/10053, is
// the integral gain per sample; their half-difference, 900/10053, is the
// proportional gain.
//
// The coefficients are held as fixed-point constants with FRAC fractional
// bits (B = round(coef * 2^FRAC)); the products by constants reduce to shifts
// and additions in synthesis. The accumulator carries the FRAC fractional
// bits, and is clamped to +-LIMIT (722, the stated output range) so the
// integrator cannot wind up. The fixed-point format and the clamp are this
// design's choices.
//
// Interface: x is taken on each clock where en (the 50 kHz strobe) is high;
// y is the registered integer part of the accumulator and changes on the
// clock after en. An assertion checks that y stays within +-LIMIT.
module loop_filter
  import dpll_pkg::*;
#(
  parameter longint      CT1   = 10053,
  parameter longint      CT2   = 900,
  parameter int unsigned FRAC  = 20,
  parameter int          LIMIT = LF_LIMIT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t x,
  output word_t y
);
  localparam int unsigned AW = 16 + FRAC + 4;   // accumulator width
  typedef logic signed [AW-1:0] acc_t;

  localparam longint B0 = (((64'sd1 + CT2) <<< FRAC) + CT1 / 64'sd2) / CT1;   // > 0
  localparam longint B1 = -((((CT2 - 64'sd1) <<< FRAC) + CT1 / 64'sd2) / CT1); // (1 - CT2)/CT1 < 0
  localparam acc_t   ACC_MAX = acc_t'(longint'(LIMIT) <<< FRAC);
  localparam acc_t   ACC_MIN = -ACC_MAX;

  acc_t  acc_q;
  word_t x_prev_q;
  acc_t  acc_sum;
  acc_t  acc_next;

  always_comb begin
    acc_sum = acc_q + acc_t'(B0) * acc_t'(x) + acc_t'(B1) * acc_t'(x_prev_q);
    if (acc_sum > ACC_MAX)      acc_next = ACC_MAX;
    else if (acc_sum < ACC_MIN) acc_next = ACC_MIN;
    else                        acc_next = acc_sum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q    <= '0;
      x_prev_q <= '0;
    end else if (en) begin
      acc_q    <= acc_next;
      x_prev_q <= x;
    end
  end

  assign y = word_t'(acc_q >>> FRAC);

  // The output never leaves the stated range.
  always_ff @(posedge clk) begin
    if (rst_n) assert (y <= word_t'(LIMIT) && y >= -word_t'(LIMIT))
      else $error("loop_filter: output %0d outside +-%0d", y, LIMIT);
  end
endmodule
