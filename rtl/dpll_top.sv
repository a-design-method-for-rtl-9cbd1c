// dpll_top: second-order digital phase-locked loop around a 10 kHz carrier.
//
// The loop is the classic three-part PLL, each part obtained from its
// analog counterpart by the bilinear transform:
//   phase_detector  li x dout, halved, then two shift-and-add RC low-pass
//                   sections; gives a DC term proportional to cos(phase
//                   difference)                                 (640 kHz)
//   loop_filter     ideal second-order-loop PI filter, c*tau1 = 10053,
//                   c*tau2 = 900, output clamped to +-722        (50 kHz)
//   nco             10 kHz, 32-point carrier rotated by an offset of up to
//                   +-400 Hz set by the loop-filter output       (320 kHz)
// The NCO output dout is fed back into the phase detector. Design point:
// K = 2*pi*400 rad/s, zeta = 0.707, w_n = 50*pi rad/s, 80 MHz clock.
//
// Because the phase detector is a multiplier, the loop settles where the
// mean of li x dout is zero: dout runs at the input frequency with a 90
// degree phase offset. The loop-filter output in lock equals the input's
// frequency offset from 10 kHz in units of 400/722 Hz (about 0.554 Hz).
//
// Interface: li is the signed 8-bit A/D sample, taken on each clock where
// li_sample is high (every 125 clocks). dout is the NCO sample, updated every
// 250 clocks. pd_out and lf_out expose the filtered phase error and the
// frequency control for observation. Reset is synchronous, active low, and
// clears every register. The three sample rates, the linear mapping of the
// loop-filter range onto the NCO's offset range and the reset are this
// design's choices where the method leaves them open.
module dpll_top
  import dpll_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t li,
  output logic    li_sample,
  output sample_t dout,
  output word_t   pd_out,
  output word_t   lf_out
);
  logic  pd_en, lf_en;

  strobe_gen #(.DIV(PD_DIV)) u_pd_rate (.clk(clk), .rst_n(rst_n), .strobe(pd_en));
  strobe_gen #(.DIV(LF_DIV)) u_lf_rate (.clk(clk), .rst_n(rst_n), .strobe(lf_en));

  assign li_sample = pd_en;

  phase_detector u_pd (
    .clk(clk), .rst_n(rst_n), .en(pd_en), .li(li), .nco(dout), .pd_out(pd_out)
  );

  loop_filter u_lf (
    .clk(clk), .rst_n(rst_n), .en(lf_en), .x(pd_out), .y(lf_out)
  );

  nco u_nco (
    .clk(clk), .rst_n(rst_n), .ctrl(lf_out), .tick(), .dout(dout)
  );
endmodule
