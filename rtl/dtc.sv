// dtc: digital-to-time converter (pulse selector) for one 8-bit pixel.
//
// Four 2:1 multiplexers, all steered by msb_en, pass either the lower nibble
// X[3:0] (msb_en=0) or the upper nibble X[7:4] (msb_en=1); bit i of the selected
// nibble comes from X[i] or X[i+4]. The nibble selects one of the pulse
// generator's free-running signals T0..T15 through a 16:1 multiplexer. Over one
// MAC period the output ps_out is high for X quanta of t0 in 1x mode (X truncated
// to the quantum in the speedup modes). This structure is the document's.
//
// Purely combinational; x must be held for the whole MAC period.
module dtc
  import tdcnn_pkg::*;
(
  input  logic [PIX_W-1:0] x,
  input  logic [N_PWM-1:0] pwm,
  input  logic             msb_en,
  output logic             ps_out
);

  logic [3:0] sel;

  always_comb begin
    for (int i = 0; i < 4; i++) sel[i] = msb_en ? x[i+4] : x[i];
  end

  assign ps_out = pwm[sel];

endmodule
