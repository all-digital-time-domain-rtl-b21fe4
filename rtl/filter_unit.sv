// filter_unit: one convolution filter of the engine.
//
// N_MAC (4) MAC blocks share the filter's binary weight and the MDL length and
// each receive the PWM pulse of a different pixel, so they compute the four
// convolution outputs that one 2x2 pooling window covers. Each MDL has its own
// calibration setting, to match the four against each other. A pooling unit
// combines the four counts. Structure follows the document (4 MAC blocks per
// filter, calibration on all four MDLs, on-chip pooling).
//
// Interface: rst (synchronous, active high) clears all four MDLs and counters;
// counts and pooled change as the loops turn and are final once the last tap's
// MAC period has ended.
module filter_unit
  import tdcnn_pkg::*;
#(
  parameter int unsigned N_MAC      = 4,
  parameter int unsigned N_UNITS    = 16,
  parameter int unsigned CAL_STAGES = 7,
  parameter int unsigned CNT_W      = 12,
  localparam int unsigned LEN_W     = $clog2(N_UNITS + 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [N_MAC-1:0]        ps,
  input  weight_t                 w,
  input  logic [LEN_W-1:0]        len,
  input  logic [0:2]              cal_bit    [N_MAC],
  input  logic [N_MAC-1:0]        cal_enable,
  output logic signed [CNT_W-1:0] counts     [N_MAC],
  output logic signed [CNT_W-1:0] pooled
);

  for (genvar b = 0; b < N_MAC; b++) begin : g_mac
    logic [N_UNITS-1:0] state;
    mac_block #(
      .N_UNITS(N_UNITS), .CAL_STAGES(CAL_STAGES), .CNT_W(CNT_W)
    ) u_mac (
      .clk        (clk),
      .rst        (rst),
      .ps         (ps[b]),
      .w          (w),
      .len        (len),
      .cal_bit    (cal_bit[b]),
      .cal_enable (cal_enable[b]),
      .count      (counts[b]),
      .state      (state)
    );
  end

  pooling_unit #(.N_IN(N_MAC), .CNT_W(CNT_W)) u_pool (
    .in_count (counts),
    .pooled   (pooled)
  );

endmodule
