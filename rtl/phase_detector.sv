// phase_detector: multiplier phase detector with a two-stage low-pass.
//
// The input sample li is multiplied by the NCO output; for two carriers
// A*cos(wt + p) and B*cos(wt + q) the product holds (A*B/2)*cos(p - q) plus
// a component at twice the carrier. The product, in [-16129,16129] for 8-bit
// samples, is halved to [-8064,8064] and passed through two identical
// first-order shift-and-add IIR sections (iir_lowpass) that remove the
// double-frequency term and leave the phase-difference term.
//
// Interface: li and nco are taken on each clock where en (the 640 kHz
// sample strobe) is high. The mixer product is registered on that strobe;
// each low-pass stage then advances on the next strobe, so pd_out lags the
// samples by three strobes plus one clock. The halving shift is this
// design's reading of the two stated ranges.
module phase_detector
  import dpll_pkg::*;
#(
  parameter int unsigned N_SHIFT = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t li,
  input  sample_t nco,
  output word_t   pd_out
);
  logic signed [15:0] product;
  word_t mix_q;
  word_t lp1;

  assign product = li * nco;

  always_ff @(posedge clk) begin
    if (!rst_n)  mix_q <= '0;
    else if (en) mix_q <= product >>> 1;
  end

  iir_lowpass #(.N_SHIFT(N_SHIFT), .XW(16)) u_lp1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(mix_q), .y(lp1)
  );

  iir_lowpass #(.N_SHIFT(N_SHIFT), .XW(16)) u_lp2 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(lp1), .y(pd_out)
  );
endmodule
