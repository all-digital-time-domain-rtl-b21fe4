// tb_conv_controller: checks the convolution sequence.
//
// A mac_tick is generated every P cycles. For channel counts 1..7 the
// testbench checks that the taps are requested in order (channel-major,
// KTAPS taps each), that ld comes only with mac_tick, that the MDLs are reset
// for exactly one MAC period before the first tap, that taps are active for
// n*KTAPS periods, and that out_valid comes (2 + n*(KTAPS+1)) MAC periods after
// the first boundary following start: 28 periods for one channel (LeNet-5 C1)
// and 158 for six (C3).
module tb_conv_controller;
  localparam int KT = 25;
  localparam int P  = 16;

  logic clk = 1'b0, rst_n = 1'b0, mac_tick, start = 1'b0;
  logic [3:0] n_chan = 4'd1;
  logic busy, mdl_rst, tap_active, ld, req_valid, out_valid;
  logic [3:0] req_chan;
  logic [4:0] req_tap;
  int phase = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) phase <= (!rst_n || phase == P - 1) ? 0 : phase + 1;
  assign mac_tick = (phase == P - 1);

  conv_controller #(.KTAPS(KT), .CH_W(4)) dut (
    .clk, .rst_n, .mac_tick, .start, .n_chan, .busy, .mdl_rst, .tap_active,
    .ld, .req_valid, .req_chan, .req_tap, .out_valid
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int n = 1; n <= 7; n++) begin
      int periods, rst_cyc, tap_cyc, lds, exp_c, exp_t;
      bit order_ok;
      n_chan = 4'(n);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy after start");
      while (!mac_tick) @(negedge clk);   // first boundary
      periods = 0; rst_cyc = 0; tap_cyc = 0; lds = 0; exp_c = 0; exp_t = 0; order_ok = 1;
      forever begin
        if (ld) begin
          lds++;
          if (!mac_tick) order_ok = 0;
          if (int'(req_chan) != exp_c || int'(req_tap) != exp_t || !req_valid) order_ok = 0;
          exp_t++;
          if (exp_t == KT) begin exp_t = 0; exp_c++; end
        end
        if (out_valid) break;
        @(negedge clk);
        rst_cyc += int'(mdl_rst);
        tap_cyc += int'(tap_active);
        if (mac_tick) periods++;
        if (periods > 400) break;
      end
      check(periods == 2 + n * (KT + 1),
            $sformatf("n=%0d took %0d MAC periods, expected %0d", n, periods, 2 + n * (KT + 1)));
      check(rst_cyc == P, $sformatf("n=%0d reset cycles %0d", n, rst_cyc));
      check(tap_cyc == n * KT * P, $sformatf("n=%0d tap cycles %0d", n, tap_cyc));
      check(lds == n * KT, $sformatf("n=%0d loads %0d", n, lds));
      check(order_ok, $sformatf("n=%0d tap order", n));
      @(negedge clk);
      check(!busy, "idle after result");
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
