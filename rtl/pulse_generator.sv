// pulse_generator: free-running source of the 16 PWM reference signals T0..T15.
//
// A phase counter counts the quanta of one MAC clock period (256 t0; 256, 64,
// 32 or 16 clk cycles in the 1x, 4x, 8x and 16x modes). The period is split in
// two windows. In the first, msb_en is high for 240 t0 and Tk is high for the
// first k*16 t0 of it, so it encodes a value k of the pixel's upper nibble. In
// the second, msb_en is low for 16 t0 and Tk is high for the first k t0 of it,
// rounded down to whole quanta, so it encodes the lower nibble. A pixel X
// therefore sees Tk high for X[7:4]*16 + X[3:0] t0 in all, truncated to the
// quantum of the mode (X >> 0, 2, 3 or 4 quanta). mac_tick marks the last
// quantum of each period; the engine changes pixels, weights and sequencing
// state on it.
//
// The document gives the 16 signals, the 16:1 selection, MSB_EN and the mode
// table; the two-window shape of the signals is this design's reading of how
// an 8-bit pixel is built from 16 signals and a nibble select.
//
// Interface: mode is sampled at the end of each period, so a period is never
// cut short. Outputs are decoded from registered state; rst_n is synchronous.
module pulse_generator
  import tdcnn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  speed_mode_e       mode,
  output logic [N_PWM-1:0]  pwm,       // T0..T15
  output logic              msb_en,    // high while the upper nibble is encoded
  output logic              mac_tick   // last quantum of the MAC clock period
);

  speed_mode_e mode_q;
  logic [8:0]  t;        // quantum index inside the period
  logic [8:0]  period_q;
  logic [8:0]  window_q;
  logic [2:0]  shift_q;
  logic [8:0]  t_lsb;

  assign period_q = mac_period_q(mode_q);
  assign window_q = msb_window_q(mode_q);
  assign shift_q  = quantum_shift(mode_q);
  assign mac_tick = (t == period_q - 9'd1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t      <= '0;
      mode_q <= SPEED_1X;
    end else if (mac_tick) begin
      t      <= '0;
      mode_q <= mode;
    end else begin
      t      <= t + 9'd1;
    end
  end

  assign msb_en = (t < window_q);
  assign t_lsb  = t - window_q;

  always_comb begin
    for (int k = 0; k < N_PWM; k++) begin
      if (msb_en) pwm[k] = (t < 9'(((k * 16) >> shift_q)));
      else        pwm[k] = (t_lsb < 9'((k >> shift_q)));
    end
  end

endmodule
