// tdcnn_engine: all-digital time-domain CNN convolution engine (top level).
//
// The engine computes binary-weight convolutions with pooling by turning each
// 8-bit pixel into a pulse width and adding pulse widths as phase in a ring of
// memory-delay cells. One pulse generator drives N_MAC (4) digital-to-time
// converters, one per pixel of a 2x2 pooling window. Their pulses go to
// N_FILT (16) filters of N_MAC MAC blocks each; every MAC block gates its pulse
// with the filter's weight (+1, -1 or 0) and accumulates it in a bidirectional
// memory delay line with an up/down counter. After all taps of all input
// channels have been applied, each filter pools its four counts into one
// output. A controller runs the sequence in MAC clock periods.
//
// Timing: clk is the time quantum (twice the input clock). A MAC period is 256,
// 64, 32 or 16 clk cycles for speed mode 1x, 4x, 8x or 16x, and a convolution
// over n_chan channels of KTAPS taps takes 2 + n_chan*(KTAPS+1) MAC periods.
// The result per MAC block is floor((V + 2L - len) / 2L), where V is the signed
// sum over taps of (pixel >> quantum shift) and 2L the loop period
// (L = len + enabled calibration stages).
//
// Interface: pulse start while busy is low. While req_valid is high, present
// on pixel_in the four pixels and on weight_in the 16 weights of tap req_tap of
// channel req_chan; they are latched on the period boundary (ld) and held for
// one MAC period. out_valid pulses for one cycle with out_pooled and out_count
// valid; they stay until the next result. mode, mdl_len and the calibration
// inputs must be held during a convolution. rst_n is synchronous, active low.
//
// The block structure (pulse generator, DTC, MDL, counter, calibration,
// 4 MAC blocks per filter, 16 filters, pooling) is the document's; the
// handshake, the slot sequence and the result registers are this design's.
module tdcnn_engine
  import tdcnn_pkg::*;
#(
  parameter int unsigned N_FILT     = 16,
  parameter int unsigned N_MAC      = 4,
  parameter int unsigned N_UNITS    = 16,
  parameter int unsigned CAL_STAGES = 7,
  parameter int unsigned CNT_W      = 12,
  parameter int unsigned KTAPS      = 25,
  parameter int unsigned CH_W       = 4,
  localparam int unsigned LEN_W     = $clog2(N_UNITS + 1),
  localparam int unsigned TAP_W     = $clog2(KTAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  speed_mode_e             mode,
  input  logic [LEN_W-1:0]        mdl_len,
  input  logic [0:2]              cal_bit    [N_FILT][N_MAC],
  input  logic [N_MAC-1:0]        cal_enable [N_FILT],
  input  logic                    start,
  input  logic [CH_W-1:0]         n_chan,
  output logic                    busy,
  output logic                    req_valid,
  output logic [CH_W-1:0]         req_chan,
  output logic [TAP_W-1:0]        req_tap,
  input  logic [PIX_W-1:0]        pixel_in   [N_MAC],
  input  weight_t                 weight_in  [N_FILT],
  output logic                    out_valid,
  output logic signed [CNT_W-1:0] out_pooled [N_FILT],
  output logic signed [CNT_W-1:0] out_count  [N_FILT][N_MAC]
);

  logic [N_PWM-1:0] pwm;
  logic             msb_en, mac_tick;
  logic             mdl_rst, tap_active, ld, done;

  logic [PIX_W-1:0] pix_q [N_MAC];
  weight_t          w_q   [N_FILT];
  logic [N_MAC-1:0] ps;

  logic signed [CNT_W-1:0] counts [N_FILT][N_MAC];
  logic signed [CNT_W-1:0] pooled [N_FILT];

  pulse_generator u_pg (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (mode),
    .pwm      (pwm),
    .msb_en   (msb_en),
    .mac_tick (mac_tick)
  );

  conv_controller #(.KTAPS(KTAPS), .CH_W(CH_W)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .mac_tick   (mac_tick),
    .start      (start),
    .n_chan     (n_chan),
    .busy       (busy),
    .mdl_rst    (mdl_rst),
    .tap_active (tap_active),
    .ld         (ld),
    .req_valid  (req_valid),
    .req_chan   (req_chan),
    .req_tap    (req_tap),
    .out_valid  (done)
  );

  // Tap registers: held for one MAC period.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < N_MAC; b++) pix_q[b] <= '0;
      for (int f = 0; f < N_FILT; f++) w_q[f] <= '0;
    end else if (ld) begin
      for (int b = 0; b < N_MAC; b++) pix_q[b] <= pixel_in[b];
      for (int f = 0; f < N_FILT; f++) w_q[f] <= weight_in[f];
    end
  end

  for (genvar b = 0; b < N_MAC; b++) begin : g_dtc
    logic ps_raw;
    dtc u_dtc (
      .x      (pix_q[b]),
      .pwm    (pwm),
      .msb_en (msb_en),
      .ps_out (ps_raw)
    );
    assign ps[b] = ps_raw & tap_active;
  end

  for (genvar f = 0; f < N_FILT; f++) begin : g_filt
    filter_unit #(
      .N_MAC(N_MAC), .N_UNITS(N_UNITS), .CAL_STAGES(CAL_STAGES), .CNT_W(CNT_W)
    ) u_filt (
      .clk        (clk),
      .rst        (mdl_rst),
      .ps         (ps),
      .w          (w_q[f]),
      .len        (mdl_len),
      .cal_bit    (cal_bit[f]),
      .cal_enable (cal_enable[f]),
      .counts     (counts[f]),
      .pooled     (pooled[f])
    );
  end

  // Result registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int f = 0; f < N_FILT; f++) begin
        out_pooled[f] <= '0;
        for (int b = 0; b < N_MAC; b++) out_count[f][b] <= '0;
      end
    end else begin
      out_valid <= done;
      if (done) begin
        out_pooled <= pooled;
        out_count  <= counts;
      end
    end
  end

endmodule
