// updown_counter: counter of whole MDL loop turns, the coarse partial sum.
//
// Counts +1 on up and -1 on dn (both together leave it unchanged). The count is
// a two's-complement number of W bits (12 in the document) and wraps on
// overflow; the document does not say what happens past the range. Clocked
// model of the document's positive-edge-triggered up/down counter: the up and
// dn pulses come from the MDL in the cycle of the loop step that causes them.
// rst is synchronous and active high.
module updown_counter #(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                up,
  input  logic                dn,
  output logic signed [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)             count <= '0;
    else if (up && !dn)  count <= count + W'(1);
    else if (dn && !up)  count <= count - W'(1);
  end

endmodule
