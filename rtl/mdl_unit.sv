// mdl_unit: one bidirectional memory-delay-line unit, as a clocked model.
//
// In silicon a unit is two inverter stages with switches S1..S4. With EN=1 and
// SIGN=1 (weight +1) S1 and S2 close and the unit delays the signal arriving
// from the previous unit (clockwise). With EN=1 and SIGN=0 (weight -1) S2, S3
// and S4 close and the unit delays the signal arriving from the next unit
// (anticlockwise). With EN=0 only S3 closes: the second inverter and the S3
// inverter form a latch and the unit keeps its state (memory line). RST pulls
// the stored node to 0. The switch equations are the document's:
//   S1 = EN.SIGN   S2 = EN   S3 = EN' + EN.SIGN'   S4 = EN.SIGN'
//
// This model keeps one state bit per unit (the latch node) and lets a unit delay
// be one clk cycle: on each clock edge a unit with EN=1 takes the value of its
// upstream neighbour, and with EN=0 holds. rst is synchronous and active high.
module mdl_unit (
  input  logic clk,
  input  logic rst,        // RST: clears the stored node
  input  logic en,         // EN = X_i * w_i
  input  logic sign,       // 1: weight +1 (clockwise), 0: weight -1
  input  logic from_prev,  // clockwise input (node A side)
  input  logic from_next,  // anticlockwise input (node B side)
  output logic q           // stored node
);

  logic s1, s2, s3, s4;
  logic fwd, bwd;

  assign s1 = en & sign;
  assign s2 = en;
  assign s3 = ~en | (en & ~sign);
  assign s4 = en & ~sign;

  assign fwd = s1 & s2;
  assign bwd = s2 & s3 & s4;

  always_ff @(posedge clk) begin
    if (rst)      q <= 1'b0;
    else if (fwd) q <= from_prev;
    else if (bwd) q <= from_next;
  end

endmodule
