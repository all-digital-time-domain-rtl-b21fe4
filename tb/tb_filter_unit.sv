// tb_filter_unit: checks one filter (four MAC blocks and the pooling unit).
//
// Four independent random pixel streams share one weight per tap; each MDL has
// its own calibration setting. After KT taps the four counts must match the
// per-block reference and pooled their floor average.
module tb_filter_unit;
  import tdcnn_pkg::*;
  import tdcnn_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] ps = '0;
  weight_t w = '0;
  logic [4:0] len = 5'd16;
  logic [0:2] cal_bit [4];
  logic [3:0] cal_enable = '0;
  logic signed [11:0] counts [4];
  logic signed [11:0] pooled;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  filter_unit #(.N_MAC(4), .N_UNITS(16), .CAL_STAGES(7), .CNT_W(12)) dut (
    .clk, .rst, .ps, .w, .len, .cal_bit, .cal_enable, .counts, .pooled
  );

  initial begin
    int v [4];
    int nc [4];
    int x [4];
    int ln, wv, sum;
    @(negedge clk);
    for (int d = 0; d < 10; d++) begin
      ln = $urandom_range(1, 16);
      len = 5'(ln);
      for (int b = 0; b < 4; b++) begin
        cal_enable[b] = 1'($urandom);
        cal_bit[b] = 3'($urandom);
        nc[b] = cal_enable[b] ? int'(cal_bit[b]) : 0;
        v[b] = 0;
      end
      rst = 1'b1; @(negedge clk); rst = 1'b0;
      for (int k = 0; k < 25; k++) begin
        wv = $urandom_range(0, 2) - 1;
        w.en = (wv != 0);
        w.sign = (wv > 0);
        for (int b = 0; b < 4; b++) begin
          x[b] = $urandom_range(0, 255);
          v[b] += x[b] * wv;
        end
        for (int t = 0; t < 256; t++) begin
          for (int b = 0; b < 4; b++) ps[b] = (t < x[b]);
          @(negedge clk);
        end
      end
      ps = '0;
      @(negedge clk);
      sum = 0;
      for (int b = 0; b < 4; b++) begin
        int ex;
        ex = wrap(mdl_count(v[b], ln, nc[b]), 12);
        sum += ex;
        checks++;
        if (int'(counts[b]) != ex) begin
          failures++;
          $display("FAIL: filter run %0d block %0d count %0d exp %0d", d, b, counts[b], ex);
        end
      end
      checks++;
      if (int'(pooled) != floor_div(sum, 4)) begin
        failures++;
        $display("FAIL: pooled %0d exp %0d", pooled, floor_div(sum, 4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
