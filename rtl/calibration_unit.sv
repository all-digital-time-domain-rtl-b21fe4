// calibration_unit: trimmable extra delay inside the loop of one MDL.
//
// The document adds a calibration unit to every MDL so that the four MDLs of a
// filter can be matched by tuning cal_bit[0:2] and cal_enable, with switches
// S9 = SIGN and S10 = SIGN' steering it the same way as the delay line. Its
// insides are not given. Here it is a chain of CAL_STAGES bidirectional
// memory-delay stages (the same cell as mdl_unit) of which the first
// cal_enable ? cal_bit : 0 are spliced into the loop; the others are bypassed
// and hold. cal_bit is read as an unsigned number with cal_bit[0] as its most
// significant bit. With zero stages the unit is a plain connection.
//
// Interface: in_fwd comes from node E (last MDL unit) and out_fwd goes to the
// clockwise return inverter; in_bwd comes from the anticlockwise return
// inverter and out_bwd feeds the last MDL unit. Change the setting only while
// rst is high: stages that leave the loop keep whatever they held.
module calibration_unit #(
  parameter int unsigned CAL_STAGES = 7
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       sign,
  input  logic [0:2] cal_bit,
  input  logic       cal_enable,
  input  logic       in_fwd,
  input  logic       in_bwd,
  output logic       out_fwd,
  output logic       out_bwd
);

  logic [2:0]            n_cal;
  logic [CAL_STAGES-1:0] c;
  logic [CAL_STAGES-1:0] prev_in, next_in;

  assign n_cal = cal_enable ? 3'(cal_bit) : 3'd0;

  always_comb begin
    for (int i = 0; i < CAL_STAGES; i++) begin
      prev_in[i] = (i == 0) ? in_fwd : c[(i == 0) ? 0 : i-1];
      next_in[i] = (i == CAL_STAGES-1 || 3'(i) == n_cal - 3'd1) ? in_bwd
                                                                 : c[(i == CAL_STAGES-1) ? i : i+1];
    end
  end

  for (genvar i = 0; i < CAL_STAGES; i++) begin : g_stage
    mdl_unit u_stage (
      .clk       (clk),
      .rst       (rst),
      .en        (en && (3'(i) < n_cal)),
      .sign      (sign),
      .from_prev (prev_in[i]),
      .from_next (next_in[i]),
      .q         (c[i])
    );
  end

  assign out_fwd = (n_cal == 3'd0) ? in_fwd : c[n_cal-3'd1];
  assign out_bwd = (n_cal == 3'd0) ? in_bwd : c[0];

endmodule
