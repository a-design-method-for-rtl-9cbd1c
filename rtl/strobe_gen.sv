// strobe_gen: sample-rate strobe from the system clock.
//
// A counter that wraps every DIV clocks; strobe is high for the one clock
// in each period where the counter holds DIV-1, so the first strobe after
// reset comes DIV clocks after reset is released. Used to run each part of
// the loop at its own sample rate from the single 80 MHz clock (640 kHz for
// the phase detector, 50 kHz for the loop filter).
module strobe_gen #(
  parameter int unsigned DIV = 125
) (
  input  logic clk,
  input  logic rst_n,
  output logic strobe
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt_q;

  assign strobe = (cnt_q == W'(DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)      cnt_q <= '0;
    else if (strobe) cnt_q <= '0;
    else             cnt_q <= cnt_q + 1'b1;
  end
endmodule
