// tb_pulse_generator: checks the PWM reference signals of every speed mode.
//
// For each mode the testbench measures one whole MAC period: its length
// (256 >> s quanta), one mac_tick, msb_en high for 240 >> s quanta, and the
// high time of each Tk (k*16 >> s in the upper-nibble window plus k >> s in the
// lower-nibble window). It also checks that a mode change waits for the end of
// the running period.
module tb_pulse_generator;
  import tdcnn_pkg::*;
  import tdcnn_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  speed_mode_e mode = SPEED_1X;
  logic [N_PWM-1:0] pwm;
  logic msb_en, mac_tick;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pulse_generator dut (.clk, .rst_n, .mode, .pwm, .msb_en, .mac_tick);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure the period that starts after the next mac_tick.
  task automatic measure(int m);
    int len, msb, ticks, s;
    int hi [N_PWM];
    s = shift_of(m);
    do @(negedge clk); while (!mac_tick);
    len = 0; msb = 0; ticks = 0;
    foreach (hi[k]) hi[k] = 0;
    forever begin
      @(negedge clk);
      len++;
      msb += int'(msb_en);
      ticks += int'(mac_tick);
      for (int k = 0; k < N_PWM; k++) hi[k] += int'(pwm[k]);
      if (mac_tick || len > 300) break;
    end
    check(len == (256 >> s), $sformatf("mode %0d period %0d", m, len));
    check(ticks == 1, $sformatf("mode %0d ticks %0d", m, ticks));
    check(msb == (240 >> s), $sformatf("mode %0d msb_en %0d", m, msb));
    for (int k = 0; k < N_PWM; k++)
      check(hi[k] == ((k * 16) >> s) + (k >> s),
            $sformatf("mode %0d T%0d high %0d", m, k, hi[k]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 4; m++) begin
      mode = speed_mode_e'(m);
      // first tick adopts the mode, the next period is measured
      do @(negedge clk); while (!mac_tick);
      measure(m);
    end
    // A mode change in mid-period must not shorten the running period.
    mode = SPEED_1X;
    do @(negedge clk); while (!mac_tick);
    do @(negedge clk); while (!mac_tick);
    repeat (12) @(negedge clk);
    mode = SPEED_16X;
    begin
      int n;
      n = 0;
      while (!mac_tick) begin @(negedge clk); n++; end
      check(n == 256 - 12, $sformatf("period cut short: %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
