// mdl: bidirectional memory delay line, the time accumulator of one MAC block.
//
// The first len of N_UNITS mdl_units, the calibration unit and an inverting
// return stage form a closed loop (node A at the input of unit 1, node E at the
// output of the last active unit). While EN=1 an edge runs round the loop,
// clockwise for SIGN=1 (return inverter switched by S5 = SIGN) and
// anticlockwise for SIGN=0 (S6 = SIGN'); while EN=0 every unit latches and the
// phase reached is kept. The loop therefore stores, as a phase, the signed sum
// of all EN-high time it has seen, across MAC periods.
//
// Clocked model: one unit delay is one clk cycle, so the loop is a twisted-ring
// (Johnson) shift register of L = len + calibration stages with 2L states. An
// up pulse is given when a clockwise step makes E rise and a down pulse when an
// anticlockwise step makes E fall. These are the same boundary crossed in the
// two directions, so an up/down counter of them counts whole turns exactly:
// after V net steps from reset, the count is floor((V + 2L - len) / 2L). The
// document draws node A on the counter's Down input and E on its Up input; here
// both pulses are taken at E so that the two directions cancel exactly.
//
// len ("configurable MDL length") selects the loop length and so the averaging
// divisor; 0 or values above N_UNITS mean N_UNITS. Units beyond len hold.
// Interface: rst is synchronous, active high; up and dn are combinational and
// valid in the cycle of the step that causes them.
module mdl #(
  parameter int unsigned N_UNITS    = 16,
  parameter int unsigned CAL_STAGES = 7,
  localparam int unsigned LEN_W     = $clog2(N_UNITS + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               sign,
  input  logic [LEN_W-1:0]   len,
  input  logic [0:2]         cal_bit,
  input  logic               cal_enable,
  output logic               e,        // node E
  output logic [N_UNITS-1:0] state,    // MDL state vector
  output logic               up,
  output logic               dn
);

  localparam int unsigned IDX_W = (N_UNITS > 1) ? $clog2(N_UNITS) : 1;

  logic [LEN_W-1:0]   len_eff;
  logic [IDX_W-1:0]   last;       // index of the last active unit
  logic [N_UNITS-1:0] prev_in, next_in;
  logic               a_fwd;      // node A, driven by the clockwise return inverter
  logic               cal_fwd, cal_bwd;

  assign len_eff = (len == '0 || len > LEN_W'(N_UNITS)) ? LEN_W'(N_UNITS) : len;
  assign last    = IDX_W'(len_eff - LEN_W'(1));

  always_comb begin
    for (int i = 0; i < N_UNITS; i++) begin
      prev_in[i] = (i == 0) ? a_fwd : state[(i == 0) ? 0 : i-1];
      next_in[i] = (i == N_UNITS-1 || LEN_W'(i) == len_eff - LEN_W'(1)) ? cal_bwd
                                                                        : state[(i == N_UNITS-1) ? i : i+1];
    end
  end

  for (genvar i = 0; i < N_UNITS; i++) begin : g_unit
    mdl_unit u_unit (
      .clk       (clk),
      .rst       (rst),
      .en        (en && (LEN_W'(i) < len_eff)),
      .sign      (sign),
      .from_prev (prev_in[i]),
      .from_next (next_in[i]),
      .q         (state[i])
    );
  end

  calibration_unit #(.CAL_STAGES(CAL_STAGES)) u_cal (
    .clk        (clk),
    .rst        (rst),
    .en         (en),
    .sign       (sign),
    .cal_bit    (cal_bit),
    .cal_enable (cal_enable),
    .in_fwd     (e),
    .in_bwd     (~state[0]),
    .out_fwd    (cal_fwd),
    .out_bwd    (cal_bwd)
  );

  assign a_fwd = ~cal_fwd;
  assign e     = state[last];

  assign up = en &  sign & ~e &  prev_in[last];
  assign dn = en & ~sign &  e & ~next_in[last];

endmodule
