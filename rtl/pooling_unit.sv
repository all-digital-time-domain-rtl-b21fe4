// pooling_unit: 2x2 average pooling of the four MAC results of one filter.
//
// The four MAC blocks of a filter compute four neighbouring convolution outputs;
// this unit adds them and divides by four with an arithmetic shift (rounding
// towards minus infinity), giving one pooled output of the same width. The
// document names on-chip pooling and counts one pooling operation per four
// MACs; that it is an average (LeNet-5 subsampling) and how it rounds is this
// design's choice. Combinational.
module pooling_unit #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned CNT_W = 12,
  localparam int unsigned SUM_W = CNT_W + $clog2(N_IN)
) (
  input  logic signed [CNT_W-1:0] in_count [N_IN],
  output logic signed [CNT_W-1:0] pooled
);

  logic signed [SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_IN; i++) sum += SUM_W'(in_count[i]);
  end

  assign pooled = CNT_W'(sum >>> $clog2(N_IN));

endmodule
