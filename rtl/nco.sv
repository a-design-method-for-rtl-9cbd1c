// nco: numerically controlled oscillator made from a fixed carrier and a
// controllable offset.
//
// Rather than changing the step of a single oscillator (which near 10 kHz
// with 250 clocks per point moves the frequency in coarse 40 Hz steps), the
// output frequency w0 + dw is formed by the angle-sum identity
//     cos[(w0 + dw)t] = cos(w0 t)*cos(dw t) - sin(w0 t)*sin(dw t).
// The carrier cos/sin(w0 t) steps through a 2^CARRIER_AW-point table, one
// point every NCO_DIV clocks: 32 points x 250 clocks at 80 MHz is 10 kHz.
// The offset cos/sin(dw t) comes from a PHASE_W-bit phase accumulator that
// advances on the same tick and addresses a finer 2^OFFS_AW-point table; its
// step is ctrl times a constant chosen so ctrl = +-CTRL_MAX gives an offset
// of +-OFFS_MAX_HZ (the loop filter's +-722 onto +-400 Hz, i.e.
// -800*pi < dw < 800*pi rad/s). Each table holds 8-bit samples of amplitude
// 127; the difference of the two 16-bit products is 16129*cos(...) within
// rounding, and is scaled back by 2^7 and clamped to [-127,127].
//
// Interface: ctrl is signed and read on every tick. tick is high for one
// clock every NCO_DIV clocks (320 kHz); dout is registered and changes on the
// clock after tick; an assertion checks it stays in [-127,127]. Reset starts both phases at zero, so dout settles at 126
// (the scaled cos 0) after the first tick. The offset oscillator's form (an
// accumulator and a 1024-point table), the output scaling and the reset
// state are this design's choices; the two-product structure, the carrier
// table and the ranges follow the method.
module nco
  import dpll_pkg::*;
#(
  parameter int unsigned CARRIER_AW    = 5,
  parameter int unsigned DIV           = NCO_DIV,
  parameter int unsigned OFFS_AW       = 10,
  parameter int unsigned PHASE_W       = 32,
  parameter int          CTRL_MAX      = LF_LIMIT,
  parameter int unsigned OFFS_MAX_HZ   = OFFSET_MAX_HZ,
  parameter int unsigned TICK_HZ       = CLK_HZ / NCO_DIV
) (
  input  logic    clk,
  input  logic    rst_n,
  input  word_t   ctrl,
  output logic    tick,
  output sample_t dout
);
  // Phase step per ctrl LSB: OFFS_MAX_HZ / CTRL_MAX / TICK_HZ * 2^PHASE_W.
  localparam longint INC_PER_LSB =
      ((longint'(OFFS_MAX_HZ) <<< PHASE_W) + longint'(CTRL_MAX) * TICK_HZ / 2)
      / (longint'(CTRL_MAX) * TICK_HZ);

  localparam int unsigned DIV_W = $clog2(DIV);

  logic [DIV_W-1:0]      div_q;
  logic [CARRIER_AW-1:0] car_q;     // carrier phase index
  logic [PHASE_W-1:0]    offs_q;    // offset phase accumulator
  logic [PHASE_W-1:0]    step;

  logic [CARRIER_AW-1:0] car_cos_addr;
  logic [OFFS_AW-1:0]    offs_addr, offs_cos_addr;
  sample_t car_sin, car_cos, offs_sin, offs_cos;

  logic signed [15:0] p_cos, p_sin;
  logic signed [16:0] diff;
  logic signed [9:0]  scaled;
  sample_t            dout_next;

  assign tick = (div_q == DIV_W'(DIV - 1));
  assign step = PHASE_W'(longint'(ctrl) * INC_PER_LSB);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_q  <= '0;
      car_q  <= '0;
      offs_q <= '0;
      dout   <= '0;
    end else begin
      div_q <= tick ? '0 : div_q + 1'b1;
      if (tick) begin
        car_q  <= car_q + 1'b1;
        offs_q <= offs_q + step;
        dout   <= dout_next;
      end
    end
  end

  // Cosine = sine a quarter period ahead.
  assign car_cos_addr  = car_q + CARRIER_AW'(1 << (CARRIER_AW - 2));
  assign offs_addr     = offs_q[PHASE_W-1 -: OFFS_AW];
  assign offs_cos_addr = offs_addr + OFFS_AW'(1 << (OFFS_AW - 2));

  sin_rom #(.AW(CARRIER_AW)) u_car_sin  (.addr(car_q),         .data(car_sin));
  sin_rom #(.AW(CARRIER_AW)) u_car_cos  (.addr(car_cos_addr),  .data(car_cos));
  sin_rom #(.AW(OFFS_AW))    u_offs_sin (.addr(offs_addr),     .data(offs_sin));
  sin_rom #(.AW(OFFS_AW))    u_offs_cos (.addr(offs_cos_addr), .data(offs_cos));

  always_comb begin
    p_cos  = car_cos * offs_cos;
    p_sin  = car_sin * offs_sin;
    diff   = 17'(p_cos) - 17'(p_sin);
    scaled = 10'(diff >>> 7);
    if (scaled > 10'sd127)       dout_next = 8'sd127;
    else if (scaled < -10'sd127) dout_next = -8'sd127;
    else                         dout_next = scaled[7:0];
  end

  // The angle-sum output stays within the 8-bit sample range.
  always_ff @(posedge clk) begin
    if (rst_n) assert (dout <= 8'sd127 && dout >= -8'sd127)
      else $error("nco: dout %0d outside [-127,127]", dout);
  end
endmodule
