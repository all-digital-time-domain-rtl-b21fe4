// tb_pooling_unit: checks the 2x2 average pooling (sum of four signed counts,
// arithmetic shift right by two) on random and extreme values.
module tb_pooling_unit;
  import tdcnn_ref_pkg::*;
  logic signed [11:0] in_count [4];
  logic signed [11:0] pooled;
  int checks = 0, failures = 0;

  pooling_unit #(.N_IN(4), .CNT_W(12)) dut (.in_count, .pooled);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int s;
      s = 0;
      for (int b = 0; b < 4; b++) begin
        int r;
        r = (i == 0) ? 2047 : (i == 1) ? -2048 : $urandom_range(0, 4095) - 2048;
        in_count[b] = 12'(r);
        s += r;
      end
      #1;
      checks++;
      if (int'(pooled) != floor_div(s, 4)) begin
        failures++;
        $display("FAIL: sum %0d pooled %0d", s, pooled);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
