// tdcnn_pkg: types and constants shared by the time-domain CNN engine.
//
// Time base. Every module runs on one clock, clk, whose period is one time
// quantum: the finest pulse-width step the pulse generator can produce. That
// quantum is half an input-clock period, so clk runs at twice the input clock
// (the input clock is 24 MHz in the reference operating point, clk then 48 MHz).
// One MAC clock period is always 256 t0, where t0 is the pixel LSB. In 1x mode
// a quantum is t0; in the 4x, 8x and 16x speedup modes a quantum is 4, 8 and
// 16 t0, so a MAC period lasts 256, 64, 32 and 16 clk cycles (128, 32, 16 and 8
// input clocks, as the mode table gives) and the pixel loses its 0, 2, 3 or 4
// least significant bits.
//
// Weights are one bit plus a sign: +1 (SIGN=1), -1 (SIGN=0), or 0 (the AND gate
// in front of the memory delay line stays closed).
package tdcnn_pkg;

  // Pixel width and the number of free-running PWM reference signals T0..T15.
  localparam int unsigned PIX_W = 8;
  localparam int unsigned N_PWM = 16;
  // One MAC clock period in t0, and the part of it that carries the pixel's
  // upper nibble (15 steps of 16 t0); the remaining 16 t0 carry the lower nibble.
  localparam int unsigned MAC_PERIOD_T0 = 256;
  localparam int unsigned MSB_WINDOW_T0 = 240;

  typedef enum logic [1:0] {
    SPEED_1X  = 2'd0,
    SPEED_4X  = 2'd1,
    SPEED_8X  = 2'd2,
    SPEED_16X = 2'd3
  } speed_mode_e;

  // Binary weight: en=0 is weight 0; en=1 with sign=1 is +1, with sign=0 is -1.
  typedef struct packed {
    logic en;
    logic sign;
  } weight_t;

  // log2 of the quantum in t0 for a speedup mode.
  function automatic logic [2:0] quantum_shift(speed_mode_e m);
    unique case (m)
      SPEED_1X:  return 3'd0;
      SPEED_4X:  return 3'd2;
      SPEED_8X:  return 3'd3;
      default:   return 3'd4;
    endcase
  endfunction

  // MAC clock period in clk cycles (quanta).
  function automatic logic [8:0] mac_period_q(speed_mode_e m);
    return 9'(MAC_PERIOD_T0 >> quantum_shift(m));
  endfunction

  // Length of the upper-nibble window in quanta.
  function automatic logic [8:0] msb_window_q(speed_mode_e m);
    return 9'(MSB_WINDOW_T0 >> quantum_shift(m));
  endfunction

endpackage
