// tb_mac_block: checks one MAV block over whole dot products.
//
// Each dot product applies KT random (pixel, weight) pairs, one per 256-cycle
// MAC period, the pixel as an ideal PWM pulse of X cycles. Weights are +1, -1
// or 0. At the end the count must equal floor((V + 2L - len) / 2L) wrapped to
// 12 bits, V being the signed sum of X*w. Both the +1/-1 and the 0/+1 weight
// sets are used.
module tb_mac_block;
  import tdcnn_pkg::*;
  import tdcnn_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, ps = 1'b0;
  weight_t w = '0;
  logic [4:0] len = 5'd16;
  logic [0:2] cal_bit = '0;
  logic cal_enable = 1'b0;
  logic signed [11:0] count;
  logic [15:0] state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_block #(.N_UNITS(16), .CAL_STAGES(7), .CNT_W(12)) dut (
    .clk, .rst, .ps, .w, .len, .cal_bit, .cal_enable, .count, .state
  );

  initial begin
    int v, ln, nc, x, wv, kt;
    @(negedge clk);
    for (int d = 0; d < 24; d++) begin
      ln = $urandom_range(1, 16);
      cal_enable = 1'($urandom);
      cal_bit = 3'($urandom);
      nc = cal_enable ? int'(cal_bit) : 0;
      len = 5'(ln);
      kt = (d % 3 == 0) ? 25 : 9;
      rst = 1'b1; @(negedge clk); rst = 1'b0;
      v = 0;
      for (int k = 0; k < kt; k++) begin
        x = $urandom_range(0, 255);
        if (d % 2 == 0) wv = $urandom_range(0, 1) ? 1 : -1;     // signed weights
        else            wv = $urandom_range(0, 1);              // unsigned weights
        w.en = (wv != 0);
        w.sign = (wv > 0);
        v += x * wv;
        for (int t = 0; t < 256; t++) begin
          ps = (t < x);
          @(negedge clk);
        end
      end
      ps = 1'b0;
      @(negedge clk);
      checks++;
      if (int'(count) != wrap(mdl_count(v, ln, nc), 12)) begin
        failures++;
        $display("FAIL: product %0d len %0d cal %0d V %0d count %0d exp %0d",
                 d, ln, nc, v, count, wrap(mdl_count(v, ln, nc), 12));
      end
      checks++;
      if (state != 16'(ring_units(v, ln, nc))) begin
        failures++;
        $display("FAIL: residue state of product %0d", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
