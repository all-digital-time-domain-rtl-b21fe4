// mac_block: one time-domain multiply-accumulate-average (MAV) block.
//
// The pixel's PWM pulse ps (from a dtc) is ANDed with the weight's enable bit,
// giving EN = X_i * w_i; the weight's sign picks the direction in which the
// memory delay line turns. Over a convolution the MDL adds up the signed
// EN-high time of every tap, and the up/down counter counts its whole turns, so
// count is the signed dot product divided by the loop period 2L (the average of
// the MAV operation, with L set by len and the calibration setting). The AND
// gate, MDL and counter follow the document.
//
// Interface: rst (synchronous, active high) clears the loop and the counter.
// ps and w are sampled every clk cycle.
module mac_block
  import tdcnn_pkg::*;
#(
  parameter int unsigned N_UNITS    = 16,
  parameter int unsigned CAL_STAGES = 7,
  parameter int unsigned CNT_W      = 12,
  localparam int unsigned LEN_W     = $clog2(N_UNITS + 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ps,
  input  weight_t                 w,
  input  logic [LEN_W-1:0]        len,
  input  logic [0:2]              cal_bit,
  input  logic                    cal_enable,
  output logic signed [CNT_W-1:0] count,
  output logic [N_UNITS-1:0]      state
);

  logic en, e, up, dn;

  assign en = ps & w.en;

  mdl #(.N_UNITS(N_UNITS), .CAL_STAGES(CAL_STAGES)) u_mdl (
    .clk        (clk),
    .rst        (rst),
    .en         (en),
    .sign       (w.sign),
    .len        (len),
    .cal_bit    (cal_bit),
    .cal_enable (cal_enable),
    .e          (e),
    .state      (state),
    .up         (up),
    .dn         (dn)
  );

  updown_counter #(.W(CNT_W)) u_cnt (
    .clk   (clk),
    .rst   (rst),
    .up    (up),
    .dn    (dn),
    .count (count)
  );

endmodule
